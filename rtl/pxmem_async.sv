`timescale 1ns/1ps
// Desynchronized input register file (PxMem) of the edge detector.
//
// Nine 32-bit registers hold the memory words the Sobel window is built
// from; only one of them is loaded per memory read. As in the thesis the
// registers form three groups of three (pxmem_group). Each group receives
// a 2-bit code (2'b00 = no register of this group); the OR of a group's two
// code bits is that group's select for a 1:3 handshake de-multiplexer that
// routes the write request to the group and a 3:1 multiplexer that routes
// the group's answer back. Since only one register is active at a time, a
// single matched delay, placed after the multiplexer, covers the path from
// the registers to whatever consumes them; it is the only delay in the
// block. Register r of group g is word 3*g + r of `px`.
//
// Interface and timing: at most one group's code may be non-zero, and the
// codes must be stable from `in_req` until `out_req` shows the new token
// (see pxmem_group for the write sequence: the output handshake releases
// the register's old word and the new word is valid once `out_req` rises).
// After reset all registers hold 0. The delay length (20 gates, 2 ns) is
// this design's choice.
module pxmem_async #(
  parameter int unsigned WORD_W         = 32,
  parameter int unsigned DELAY_STAGES   = 20,
  parameter real         STAGE_DELAY_NS = 0.1
) (
  input  logic                   rst,
  input  logic [2:0][1:0]        code,
  input  logic [WORD_W-1:0]      word,
  input  logic                   in_req,
  output logic                   in_ack,
  output logic                   out_req,
  input  logic                   out_ack,
  output logic [8:0][WORD_W-1:0] px
);

  logic [2:0] gsel, g_in_req, g_in_ack, g_out_req, g_out_ack;
  logic       mux_req;

  for (genvar g = 0; g < 3; g++) begin : g_grp
    assign gsel[g] = |code[g];
    pxmem_group #(.WORD_W(WORD_W)) u_group (
      .rst(rst), .code(code[g]), .word(word),
      .in_req(g_in_req[g]), .in_ack(g_in_ack[g]),
      .out_req(g_out_req[g]), .out_ack(g_out_ack[g]),
      .q(px[3*g +: 3])
    );
  end

  async_demux #(.N(3)) u_demux (
    .sel(gsel), .in_req(in_req), .in_ack(in_ack), .out_req(g_in_req), .out_ack(g_in_ack)
  );

  async_mux #(.N(3)) u_mux (
    .rst(rst), .sel(gsel), .in_req(g_out_req), .in_ack(g_out_ack), .out_req(mux_req), .out_ack(out_ack)
  );

  matched_delay #(.STAGES(DELAY_STAGES), .STAGE_DELAY_NS(STAGE_DELAY_NS)) u_delay (
    .din(mux_req), .dout(out_req)
  );

endmodule
