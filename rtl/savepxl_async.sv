`timescale 1ns/1ps
// Desynchronized output register (savePxl) of the edge detector.
//
// Two registers as in the thesis:
//
//  * Four 8-bit pixel registers collect computed pixels; a 2-bit address
//    picks the register a pixel is saved into. Following the thesis they
//    are desynchronized as four separate registers (so three of them stay
//    idle on each write), with a 1:4 handshake de-multiplexer in front of
//    their controllers and a 4:1 multiplexer behind them, both selected by
//    the decoded address. One matched delay after the multiplexer covers
//    the path from the pixel registers to the word register.
//  * pxl2bus, a 32-bit register that takes the four pixels as one memory
//    word (address 0 in the low byte) for the bus, on its own channel.
//
// The pixel registers hold a token from reset (value 0) and behave like
// the PxMem registers (see pxmem_group): a pixel write to address k is
// requested on `px_req`, acknowledged on `px_ack` after the consumer has
// released k's previous pixel with a handshake on `px_out_req`/`px_out_ack`,
// and the new pixel is valid when `px_out_req` rises again. `addr` must be
// stable over that sequence.
//
// pxl2bus starts empty: a request on `word_req` captures the four pixels
// and offers them on `bus_req`/`bus_word` until the bus acknowledges with
// `bus_ack`; after that the register is transparent again. The pixels must
// be stable while a word request is pending. Address decoding and byte
// order are this design's choices; the delay (20 gates, 2 ns) too.
module savepxl_async
  import edge_pkg::*;
#(
  parameter int unsigned DELAY_STAGES   = 20,
  parameter real         STAGE_DELAY_NS = 0.1
) (
  input  logic                         rst,
  input  logic [1:0]                   addr,
  input  logic [PIXEL_W-1:0]           pixel,
  input  logic                         px_req,
  output logic                         px_ack,
  output logic                         px_out_req,
  input  logic                         px_out_ack,
  output logic [PX_PER_WORD-1:0][PIXEL_W-1:0] pixels,
  input  logic                         word_req,
  output logic                         word_ack,
  output logic                         bus_req,
  input  logic                         bus_ack,
  output logic [WORD_W-1:0]            bus_word
);

  logic [PX_PER_WORD-1:0] sel, r_in_req, r_in_ack, r_out_req, r_out_ack;
  logic                   mux_req, w_lt_m, w_lt_s;

  always_comb begin
    sel = '0;
    sel[addr] = 1'b1;
  end

  async_demux #(.N(PX_PER_WORD)) u_demux (
    .sel(sel), .in_req(px_req), .in_ack(px_ack), .out_req(r_in_req), .out_ack(r_in_ack)
  );

  for (genvar k = 0; k < PX_PER_WORD; k++) begin : g_px
    logic lt_m, lt_s;
    double_latch_ctrl #(.INIT_TOKEN(1'b1)) u_ctrl (
      .rst(rst), .in_req(r_in_req[k]), .in_ack(r_in_ack[k]),
      .out_req(r_out_req[k]), .out_ack(r_out_ack[k]), .lt_m(lt_m), .lt_s(lt_s)
    );
    double_latch_reg #(.WIDTH(PIXEL_W)) u_reg (
      .rst(rst), .lt_m(lt_m), .lt_s(lt_s), .d(pixel), .q(pixels[k])
    );
  end

  async_mux #(.N(PX_PER_WORD)) u_mux (
    .rst(rst), .sel(sel), .in_req(r_out_req), .in_ack(r_out_ack), .out_req(mux_req), .out_ack(px_out_ack)
  );

  matched_delay #(.STAGES(DELAY_STAGES), .STAGE_DELAY_NS(STAGE_DELAY_NS)) u_delay (
    .din(mux_req), .dout(px_out_req)
  );

  double_latch_ctrl #(.INIT_TOKEN(1'b0)) u_word_ctrl (
    .rst(rst), .in_req(word_req), .in_ack(word_ack),
    .out_req(bus_req), .out_ack(bus_ack), .lt_m(w_lt_m), .lt_s(w_lt_s)
  );

  double_latch_reg #(.WIDTH(WORD_W)) u_word_reg (
    .rst(rst), .lt_m(w_lt_m), .lt_s(w_lt_s), .d(pixels), .q(bus_word)
  );

endmodule
