`timescale 1ns/1ps
// Handshake fork: one sender, N receivers.
//
// Used wherever the data of one register goes to several registers. The
// request is copied to every receiver; a C element merges the receivers'
// acknowledges, so the sender sees an acknowledge only when all receivers
// have stored the data, and sees it withdrawn only when all have finished
// their return-to-zero phase. This is the thesis' fork, widened from two to
// N outputs (the thesis also uses a seven-way fork).
//
// Four-phase bundled data, push channels, no clock. `rst` clears the C
// element.
module hs_fork #(
  parameter int unsigned N = 2
) (
  input  logic         rst,
  input  logic         in_req,
  output logic         in_ack,
  output logic [N-1:0] out_req,
  input  logic [N-1:0] out_ack
);

  assign out_req = {N{in_req}};

  c_element #(.N(N)) u_c (.rst(rst), .in(out_ack), .out(in_ack));

endmodule
