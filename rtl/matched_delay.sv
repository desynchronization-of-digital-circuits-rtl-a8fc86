`timescale 1ns/1ps
// Matched delay element (behavioural model).
//
// This is a behavioural model of a physical delay line; its delay exists
// only in simulation and a synthesis tool reduces it to a wire. In silicon
// the element is a hand-placed gate chain sized so that its delay is at
// least the worst-case delay of the combinational logic it accompanies.
//
// It models the asymmetric "mixed-gate" chain: STAGES gates alternating
// NAND(previous, in) and NOR(previous, not in). A rising input has to ripple
// through every stage, so the rising edge (the request announcing valid
// data) is delayed by STAGES * STAGE_DELAY_NS; a falling input forces every
// stage at once, so the return-to-zero edge is delayed by one stage only.
// The input and its complement each drive half of the gates.
//
// Defaults: 20 gates of 0.1 ns, i.e. a 2 ns rising delay (the thesis quotes
// about 2 ns for a 20-gate chain). STAGES must be even so that the chain is
// non-inverting. Instances set STAGES to match the path they accompany.
module matched_delay #(
  parameter int unsigned STAGES         = 20,
  parameter real         STAGE_DELAY_NS = 0.1
) (
  input  logic din,
  output logic dout
);

  logic [STAGES:0] s;
  logic            din_n;

  assign din_n = ~din;
  assign s[0]  = din;

  for (genvar i = 0; i < STAGES; i += 2) begin : g_pair
    assign #(STAGE_DELAY_NS) s[i+1] = ~(s[i] & din);
    assign #(STAGE_DELAY_NS) s[i+2] = ~(s[i+1] | din_n);
  end

  assign dout = s[STAGES];

  initial begin
    assert (STAGES > 0 && STAGES % 2 == 0)
      else $error("matched_delay: STAGES must be a positive even number");
  end

endmodule
