`timescale 1ns/1ps
// One group of three desynchronized 32-bit pixel registers (part of PxMem).
//
// A 2-bit code selects the register a write goes to: 2'b01 register 0,
// 2'b10 register 1, 2'b11 register 2 and 2'b00 none. A 2:3 decoder turns
// the code into the one-hot select of a 1:3 handshake de-multiplexer in
// front of the registers' controllers and of a 3:1 handshake multiplexer
// behind them, as in the thesis (the register enables of the synchronous
// group become the mux and de-mux controls). The decoder's code assignment
// is this design's choice.
//
// Each register is a double latch with a double latch controller whose
// slave holds a token from reset on (value 0). A register keeps its word
// as long as its token is not acknowledged, so the words stay stable while
// other registers are written. A write to register k works as follows:
// with k selected the multiplexer shows k's present token on `out_req`; the
// new word enters k's master latch on `in_req` (answered by `in_ack`); when
// the consumer acknowledges the old token on `out_ack`, the slave takes the
// new word and `out_req` rises again with the new contents on q[k]; only
// then does `in_ack` fall. So one handshake on the output channel is one
// completed write. The consumer must not acknowledge a token before the
// next word for that register has been requested, since a released
// register is transparent to `word`. `code` must be
// stable from the write request until the new token is shown.
module pxmem_group #(
  parameter int unsigned WORD_W = 32
) (
  input  logic                   rst,
  input  logic [1:0]             code,
  input  logic [WORD_W-1:0]      word,
  input  logic                   in_req,
  output logic                   in_ack,
  output logic                   out_req,
  input  logic                   out_ack,
  output logic [2:0][WORD_W-1:0] q
);

  logic [2:0] sel, r_in_req, r_in_ack, r_out_req, r_out_ack;

  always_comb begin
    unique case (code)
      2'b01:   sel = 3'b001;
      2'b10:   sel = 3'b010;
      2'b11:   sel = 3'b100;
      default: sel = 3'b000;
    endcase
  end

  async_demux #(.N(3)) u_demux (
    .sel(sel), .in_req(in_req), .in_ack(in_ack), .out_req(r_in_req), .out_ack(r_in_ack)
  );

  for (genvar k = 0; k < 3; k++) begin : g_reg
    logic lt_m, lt_s;
    double_latch_ctrl #(.INIT_TOKEN(1'b1)) u_ctrl (
      .rst(rst), .in_req(r_in_req[k]), .in_ack(r_in_ack[k]),
      .out_req(r_out_req[k]), .out_ack(r_out_ack[k]), .lt_m(lt_m), .lt_s(lt_s)
    );
    double_latch_reg #(.WIDTH(WORD_W)) u_reg (
      .rst(rst), .lt_m(lt_m), .lt_s(lt_s), .d(word), .q(q[k])
    );
  end

  async_mux #(.N(3)) u_mux (
    .rst(rst), .sel(sel), .in_req(r_out_req), .in_ack(r_out_ack), .out_req(out_req), .out_ack(out_ack)
  );

endmodule
