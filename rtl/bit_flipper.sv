`timescale 1ns/1ps
// Pixel-order flipper of the edge detector.
//
// A 32-bit memory word carries four 8-bit pixels. When `flip` is 1 the four
// pixels leave in reverse order (ABCD becomes DCBA); when 0 the word passes
// unchanged. Purely combinational; the function is the thesis' own.
module bit_flipper
  import edge_pkg::*;
(
  input  logic [WORD_W-1:0] word_in,
  input  logic              flip,
  output logic [WORD_W-1:0] word_out
);

  always_comb begin
    for (int p = 0; p < PX_PER_WORD; p++)
      word_out[p*PIXEL_W +: PIXEL_W] = flip ? word_in[(PX_PER_WORD-1-p)*PIXEL_W +: PIXEL_W]
                                            : word_in[p*PIXEL_W +: PIXEL_W];
  end

endmodule
