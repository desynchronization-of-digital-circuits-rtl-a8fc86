`timescale 1ns/1ps
// Muller C element.
//
// The output rises when every input is 1, falls when every input is 0, and
// otherwise keeps its last value. It is the state-holding gate that every
// handshake circuit of the desynchronization flow is built from: the latch
// controllers, the fork (which waits for all acknowledges) and the join
// (which waits for all requests).
//
// Interface: N inputs `in`, one output `out`, and an active-high `rst` that
// forces the output to INIT. The reset is not part of the classic gate; it is
// added here so that a C element whose inputs disagree at power-up still
// starts in a known state.
//
// Timing: no clock. The gate is written as a level-sensitive latch whose
// enable is "all inputs agree", which is exactly the set/hold behaviour of the
// gate; a synthesis tool therefore reports a latch here, and that latch is
// the intended storage of the C element. A standard-cell version is an
// AO222-style gate with its output fed back.
module c_element #(
  parameter int unsigned N    = 2,
  parameter bit          INIT = 1'b0
) (
  input  logic         rst,
  input  logic [N-1:0] in,
  output logic         out
);

  always_latch begin
    if (rst)                 out = INIT;
    else if (&in || ~|in)    out = in[0];
  end

endmodule
