`timescale 1ns/1ps
// Top level: the desynchronized example circuits side by side.
//
// The design is a flow for turning a clocked circuit into a self-timed one
// by removing the clock, splitting every flip-flop register into a master
// and a slave latch, and driving the latches from four-phase handshake
// controllers connected by forks, joins and matched delays. This top holds
// the circuits built with that flow; they share no signals, and each brings
// its own reset and handshake channels out:
//
//   accu_*   desynchronized 8-bit accumulator (accu_async)
//   gcd_*    desynchronized greatest-common-divisor unit (gcd_async)
//   edge_*   the desynchronized parts of the Sobel edge detector:
//            its offset counter (offset_counter_async), and a datapath
//            memory word -> bit_flipper -> PxMem (pxmem_async) ->
//            sobel_filter -> savePxl (savepxl_async) -> bus word
//
// The edge detector's control FSM, its other counters and the selection of
// the nine window pixels out of the nine 32-bit words are not part of this
// design; here the Sobel window is the low byte of each of the nine PxMem
// registers (register i is window pixel i), and the environment drives
// the handshake channels that the FSM would drive. The Sobel filter is
// combinational between the PxMem registers and the pixel input of
// savePxl; the environment requests a pixel save only after PxMem has
// shown its new token, whose matched delay (2 ns) covers the filter.
//
// No clock exists anywhere in this design. Each circuit is idle, and its
// latches quiet, until its environment raises a request.
module desync_top
  import gcd_pkg::*;
  import edge_pkg::*;
(
  // accumulator
  input  logic                 accu_rst,
  input  logic                 accu_in_req,
  output logic                 accu_in_ack,
  input  logic [7:0]           accu_din,
  output logic                 accu_out_req,
  input  logic                 accu_out_ack,
  output logic [7:0]           accu_dout,
  // GCD
  input  logic                 gcd_rst,
  input  logic                 gcd_input_valid,
  input  logic [GCD_WIDTH-1:0] gcd_data_in,
  input  logic                 gcd_in_req,
  output logic                 gcd_in_ack,
  output logic                 gcd_out_req,
  input  logic                 gcd_out_ack,
  output logic                 gcd_output_valid,
  output logic [GCD_WIDTH-1:0] gcd_data_out,
  // edge detector: reset of all its parts
  input  logic                 edge_rst,
  // edge detector: offset counter
  input  logic                 edge_cnt_clr,
  input  logic                 edge_cnt_pause,
  input  logic                 edge_cnt_in_req,
  output logic                 edge_cnt_in_ack,
  output logic                 edge_cnt_out_req,
  input  logic                 edge_cnt_out_ack,
  output logic [OFFSET_W-1:0]  edge_cnt_low,
  output logic [MEMCOL_W-1:0]  edge_cnt_high,
  // edge detector: memory word into PxMem
  input  logic [WORD_W-1:0]    edge_mem_word,
  input  logic                 edge_mem_flip,
  input  logic [2:0][1:0]      edge_pxm_code,
  input  logic                 edge_pxm_req,
  output logic                 edge_pxm_ack,
  output logic                 edge_pxm_out_req,
  input  logic                 edge_pxm_out_ack,
  // edge detector: filtered pixel into savePxl, and the word to the bus
  output logic [PIXEL_W-1:0]   edge_pixel,
  input  logic [1:0]           edge_sav_addr,
  input  logic                 edge_sav_req,
  output logic                 edge_sav_ack,
  output logic                 edge_sav_out_req,
  input  logic                 edge_sav_out_ack,
  output logic [PX_PER_WORD-1:0][PIXEL_W-1:0] edge_sav_pixels,
  input  logic                 edge_word_req,
  output logic                 edge_word_ack,
  output logic                 edge_bus_req,
  input  logic                 edge_bus_ack,
  output logic [WORD_W-1:0]    edge_bus_word
);

  logic [WORD_W-1:0]             flipped;
  logic [8:0][WORD_W-1:0]        px;
  logic [8:0][PIXEL_W-1:0]       window;

  accu_async u_accu (
    .rst(accu_rst), .in_req(accu_in_req), .in_ack(accu_in_ack), .din(accu_din),
    .out_req(accu_out_req), .out_ack(accu_out_ack), .dout(accu_dout)
  );

  gcd_async u_gcd (
    .rst(gcd_rst), .input_valid(gcd_input_valid), .data_in(gcd_data_in),
    .in_req(gcd_in_req), .in_ack(gcd_in_ack), .out_req(gcd_out_req), .out_ack(gcd_out_ack),
    .output_valid(gcd_output_valid), .data_out(gcd_data_out)
  );

  offset_counter_async u_cnt (
    .rst(edge_rst), .clr(edge_cnt_clr), .pause(edge_cnt_pause),
    .in_req(edge_cnt_in_req), .in_ack(edge_cnt_in_ack),
    .out_req(edge_cnt_out_req), .out_ack(edge_cnt_out_ack),
    .count_low(edge_cnt_low), .count_high(edge_cnt_high)
  );

  bit_flipper u_flip (.word_in(edge_mem_word), .flip(edge_mem_flip), .word_out(flipped));

  pxmem_async u_pxmem (
    .rst(edge_rst), .code(edge_pxm_code), .word(flipped),
    .in_req(edge_pxm_req), .in_ack(edge_pxm_ack),
    .out_req(edge_pxm_out_req), .out_ack(edge_pxm_out_ack), .px(px)
  );

  for (genvar i = 0; i < 9; i++) begin : g_win
    assign window[i] = px[i][PIXEL_W-1:0];
  end

  sobel_filter u_sobel (.win(window), .pixel(edge_pixel));

  savepxl_async u_save (
    .rst(edge_rst), .addr(edge_sav_addr), .pixel(edge_pixel),
    .px_req(edge_sav_req), .px_ack(edge_sav_ack),
    .px_out_req(edge_sav_out_req), .px_out_ack(edge_sav_out_ack), .pixels(edge_sav_pixels),
    .word_req(edge_word_req), .word_ack(edge_word_ack),
    .bus_req(edge_bus_req), .bus_ack(edge_bus_ack), .bus_word(edge_bus_word)
  );

endmodule
