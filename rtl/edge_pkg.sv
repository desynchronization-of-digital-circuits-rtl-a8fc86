`timescale 1ns/1ps
// Shared constants of the edge-detector example.
//
// The edge detector works on monochrome CIF images (352 x 288 pixels of
// 8 bits) read and written as 32-bit words of four pixels. Its memory
// column counter runs over 90 word columns (0 to 89) with a 2-bit offset
// counter below it that counts 0 to 2; these limits are the thesis' own.
package edge_pkg;

  localparam int unsigned PIXEL_W      = 8;
  localparam int unsigned WORD_W       = 32;
  localparam int unsigned PX_PER_WORD  = WORD_W / PIXEL_W;
  localparam int unsigned IMG_COLS     = 352;
  localparam int unsigned IMG_ROWS     = 288;
  localparam int unsigned OFFSET_W     = 2;
  localparam int unsigned OFFSET_LAST  = 2;
  localparam int unsigned MEMCOL_W     = 7;
  localparam int unsigned MEMCOL_LAST  = 89;

endpackage
