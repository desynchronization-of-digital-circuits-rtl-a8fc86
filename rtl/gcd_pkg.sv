`timescale 1ns/1ps
// Shared types and constants of the GCD example.
//
// The state register of the GCD controller is held in ordinary latches after
// desynchronization, so its states carry a fixed 3-bit binary code. The
// seven codes and their names follow the thesis; the meaning given to each
// state in the comments is this design's reading of the names.
package gcd_pkg;

  localparam int unsigned GCD_WIDTH = 8;

  typedef enum logic [2:0] {
    WAIT_A          = 3'b000,  // wait for req, load operand A
    SET_ACKA        = 3'b001,  // ack A, wait for req to fall
    WAIT_B          = 3'b010,  // wait for req, load operand B
    RESET_ACK       = 3'b011,  // result valid with ack high, wait for req to fall
    EQUAL_CHECK     = 3'b100,  // A = B ? done : compare
    A_GREATER_CHECK = 3'b101,  // A > B ? go subtract into A : B <= B - A
    WRITE_A         = 3'b110   // A <= A - B
  } gcd_state_e;

endpackage
