`timescale 1ns/1ps
// Level-sensitive data latch used in place of half of a flip-flop.
//
// The latch is transparent (q follows d) while `ctrl` is 0 and opaque (q
// holds) while `ctrl` is 1. That polarity is the one used throughout this
// design: a latch controller raises its control signal to capture data.
// An active-high `rst` loads RESET_VAL, mirroring the reset of the register
// the latch replaces.
//
// Timing: no clock; `d` must be stable before `ctrl` rises (guaranteed by
// the matched delay on the request that causes the rise) and until the
// controller has seen the latch close. A synthesis tool infers a latch here
// on purpose. Verilator's lint reports NOLATCH ("no latches detected") for
// this block because the reset branch assigns every bit; the storage is
// still level-sensitive, as the simulation of the held value shows.
module dlatch #(
  parameter int unsigned           WIDTH     = 8,
  parameter logic [WIDTH-1:0]      RESET_VAL = '0
) (
  input  logic             rst,
  input  logic             ctrl,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_latch begin
    if (rst)        q = RESET_VAL;
    else if (!ctrl) q = d;
  end

endmodule
