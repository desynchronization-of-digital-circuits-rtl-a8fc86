`timescale 1ns/1ps
// Handshake multiplexer: N input channels, one output channel.
//
// A one-hot select `sel` chooses which input request reaches the output:
// out_req = OR over k of (sel[k] AND in_req[k]). The acknowledge of the
// output goes back only to the selected input, through a C element of that
// input's gated request and the output acknowledge, so that the acknowledge
// stays high until the output side has returned to zero. Unselected inputs
// keep their pending requests and stall until selected.
//
// In the thesis the select comes from existing datapath control logic
// (the enables of the synchronous design) rather than from a handshake
// channel, and it must stay stable for a whole handshake: it may change only
// when the selected in_req and out_ack are both low. The two-input version
// of the thesis is N = 2 with sel = {not Mux, Mux}; the one-hot N-input form
// is this design's generalisation, used for its 3:1 and 4:1 multiplexers.
module async_mux #(
  parameter int unsigned N = 2
) (
  input  logic         rst,
  input  logic [N-1:0] sel,
  input  logic [N-1:0] in_req,
  output logic [N-1:0] in_ack,
  output logic         out_req,
  input  logic         out_ack
);

  logic [N-1:0] gated;

  assign gated   = sel & in_req;
  assign out_req = |gated;

  for (genvar k = 0; k < N; k++) begin : g_ack
    c_element #(.N(2)) u_c (.rst(rst), .in({gated[k], out_ack}), .out(in_ack[k]));
  end

endmodule
