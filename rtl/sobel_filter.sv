`timescale 1ns/1ps
// Sobel edge filter for one output pixel.
//
// Takes the 3x3 neighbourhood of a pixel (`win[0]` top-left, row by row, to
// `win[8]` bottom-right) and applies the horizontal and vertical Sobel
// kernels:
//
//   Gx = (w2 + 2 w5 + w8) - (w0 + 2 w3 + w6)
//   Gy = (w6 + 2 w7 + w8) - (w0 + 2 w1 + w2)
//
// The edge strength is |Gx| + |Gy|, saturated to 255. Both kernels weigh
// the centre pixel w4 with 0, so it is not used (lint reports those bits of
// `win` as unused; the port keeps the full window for a uniform interface). The thesis names the
// Sobel operator, applied horizontally and vertically to nine pixels; how
// the two directions are combined and clipped is this design's choice (the
// usual |Gx| + |Gy| approximation of the gradient magnitude). Purely
// combinational; in the desynchronized datapath it sits between the pixel
// registers and the output pixel registers, covered by a matched delay.
module sobel_filter
  import edge_pkg::*;
(
  input  logic [8:0][PIXEL_W-1:0] win,
  output logic [PIXEL_W-1:0]      pixel
);

  logic signed [PIXEL_W+3:0] gx, gy;
  logic        [PIXEL_W+3:0] ax, ay;
  logic        [PIXEL_W+4:0] mag;

  function automatic logic signed [PIXEL_W+3:0] px(input logic [PIXEL_W-1:0] p);
    return $signed({4'b0000, p});
  endfunction

  always_comb begin
    gx  = (px(win[2]) + 2 * px(win[5]) + px(win[8])) - (px(win[0]) + 2 * px(win[3]) + px(win[6]));
    gy  = (px(win[6]) + 2 * px(win[7]) + px(win[8])) - (px(win[0]) + 2 * px(win[1]) + px(win[2]));
    ax  = (gx < 0) ? $unsigned(-gx) : $unsigned(gx);
    ay  = (gy < 0) ? $unsigned(-gy) : $unsigned(gy);
    mag = {1'b0, ax} + {1'b0, ay};
    pixel = (mag > (PIXEL_W+5)'(2**PIXEL_W - 1)) ? '1 : mag[PIXEL_W-1:0];
  end

endmodule
