`timescale 1ns/1ps
// Handshake join: N senders, one receiver.
//
// Used wherever a register (or the logic in front of it) takes data from
// several registers: the next stage may only capture once all inputs are
// valid. A C element merges the senders' requests into one request, which
// rises when all have risen and falls when all have fallen; the receiver's
// acknowledge is copied back to every sender. This is the thesis' join,
// widened from two to N inputs.
//
// Four-phase bundled data, push channels, no clock. `rst` sets the C element
// to INIT, which must equal the AND of the senders' requests after reset.
module hs_join #(
  parameter int unsigned N    = 2,
  parameter bit          INIT = 1'b0
) (
  input  logic         rst,
  input  logic [N-1:0] in_req,
  output logic [N-1:0] in_ack,
  output logic         out_req,
  input  logic         out_ack
);

  c_element #(.N(N), .INIT(INIT)) u_c (.rst(rst), .in(in_req), .out(out_req));

  assign in_ack = {N{out_ack}};

endmodule
