`timescale 1ns/1ps
// Handshake de-multiplexer: one input channel, N output channels.
//
// A one-hot select `sel` steers the input request to one output:
// out_req[k] = sel[k] AND in_req. The input acknowledge is the OR of the
// output acknowledges. There is no C element: an output request returns to
// zero as soon as the input request falls (or the select changes), so the
// block is transparent to the handshake of the stage it steers into. An
// all-zero select sends the request nowhere, which stalls the input.
//
// As for async_mux, `sel` comes from datapath control and must stay stable
// during a handshake. N = 2 with sel = {not Mux, Mux} is the thesis'
// two-way version; the N-way form is this design's generalisation.
module async_demux #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] sel,
  input  logic         in_req,
  output logic         in_ack,
  output logic [N-1:0] out_req,
  input  logic [N-1:0] out_ack
);

  assign out_req = sel & {N{in_req}};
  assign in_ack  = |out_ack;

endmodule
