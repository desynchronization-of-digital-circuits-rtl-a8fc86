`timescale 1ns/1ps
// Combinational core of the GCD example: next-state and datapath logic.
//
// The GCD computes the greatest common divisor of two bytes by repeated
// subtraction: the larger operand is replaced by the difference until both
// are equal. The synchronous original keeps A, B and the FSM state in
// flip-flops; for desynchronization those registers are moved out of this
// block, which is left purely combinational: it maps the current register
// values (`reg_a`, `reg_b`, `state`) and the inputs to the next register
// values. The registers themselves sit in gcd_async.
//
// Interface to the environment (the synchronous protocol of the original,
// not a handshake of the desynchronized circuit): `req` and the shared
// operand bus `ab` deliver A, then B, each with a four-phase req/ack
// exchange; when the result is ready `ack` rises with the result on `c`, and
// falls after `req` has been withdrawn. Each evaluation of this block is one
// step of the algorithm (one clock cycle of the original):
//
//   WAIT_A          req ? (A <= ab, SET_ACKA)          : WAIT_A
//   SET_ACKA        ack=1; req ? SET_ACKA              : WAIT_B
//   WAIT_B          req ? (B <= ab, EQUAL_CHECK)        : WAIT_B
//   EQUAL_CHECK     A == B ? RESET_ACK                  : A_GREATER_CHECK
//   A_GREATER_CHECK A >  B ? WRITE_A : (B <= B - A, EQUAL_CHECK)
//   WRITE_A         A <= A - B, EQUAL_CHECK
//   RESET_ACK       ack=1; req ? RESET_ACK              : WAIT_A
//
// The state names and codes are the thesis'; the transitions are this
// design's reconstruction from the names and the algorithm. `reset` returns
// the next state to WAIT_A.
module gcd_core
  import gcd_pkg::*;
#(
  parameter int unsigned WIDTH = GCD_WIDTH
) (
  input  logic             reset,
  input  logic             req,
  input  logic [WIDTH-1:0] ab,
  output logic             ack,
  output logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] reg_a,
  output logic [WIDTH-1:0] next_reg_a,
  input  logic [WIDTH-1:0] reg_b,
  output logic [WIDTH-1:0] next_reg_b,
  input  logic [2:0]       state,
  output logic [2:0]       next_state
);

  gcd_state_e st, nst;

  assign st = gcd_state_e'(state);

  always_comb begin
    nst        = st;
    next_reg_a = reg_a;
    next_reg_b = reg_b;
    ack        = 1'b0;
    unique case (st)
      WAIT_A: if (req) begin
        next_reg_a = ab;
        nst        = SET_ACKA;
      end
      SET_ACKA: begin
        ack = 1'b1;
        if (!req) nst = WAIT_B;
      end
      WAIT_B: if (req) begin
        next_reg_b = ab;
        nst        = EQUAL_CHECK;
      end
      EQUAL_CHECK:
        nst = (reg_a == reg_b) ? RESET_ACK : A_GREATER_CHECK;
      A_GREATER_CHECK:
        if (reg_a > reg_b) nst = WRITE_A;
        else begin
          next_reg_b = reg_b - reg_a;
          nst        = EQUAL_CHECK;
        end
      WRITE_A: begin
        next_reg_a = reg_a - reg_b;
        nst        = EQUAL_CHECK;
      end
      RESET_ACK: begin
        ack = 1'b1;
        if (!req) nst = WAIT_A;
      end
      default: nst = WAIT_A;
    endcase
    if (reset) nst = WAIT_A;
  end

  assign next_state = 3'(nst);
  assign c          = reg_a;

endmodule
