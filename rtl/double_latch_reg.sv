`timescale 1ns/1ps
// Double latch register: the data half of a desynchronized flip-flop.
//
// A master latch feeds a slave latch; each is opaque while its control is 1.
// Controlled by double_latch_ctrl it behaves like the flip-flop register it
// replaces: `d` is captured by the master when `lt_m` rises and passed on to
// `q` when the slave closes. Both latches reset to RESET_VAL, the reset
// value of the original register. Packing both latches in one block, so that
// only two control wires need routing, follows the thesis. When the
// register feeds logic that computes its own next value (a counter, the
// GCD), `d` depends on `q`; Verilator then reports the path through the
// two latches as UNOPTFLAT (circular combinational logic). It is not a
// combinational loop in operation: the controllers never open master and
// slave at the same time while a new value is being computed.
module double_latch_reg #(
  parameter int unsigned      WIDTH     = 8,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             rst,
  input  logic             lt_m,
  input  logic             lt_s,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] mid;

  dlatch #(.WIDTH(WIDTH), .RESET_VAL(RESET_VAL)) u_master (
    .rst(rst), .ctrl(lt_m), .d(d), .q(mid)
  );

  dlatch #(.WIDTH(WIDTH), .RESET_VAL(RESET_VAL)) u_slave (
    .rst(rst), .ctrl(lt_s), .d(mid), .q(q)
  );

endmodule
