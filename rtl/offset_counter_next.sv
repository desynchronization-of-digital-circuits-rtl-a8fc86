`timescale 1ns/1ps
// Next-count logic of the edge detector's two-level offset counter.
//
// The counter has a low part (0 to OFFSET_LAST = 2) and a high part, the
// memory column (0 to MEMCOL_LAST = 89). Each step the low part counts up;
// when it wraps from 2 to 0 the high part counts up, wrapping from 89 to 0.
// `clr` forces both parts to 0 and `pause` holds them, with `clr` taking
// priority. This is the combinational half of the counter, separated from
// its register so that the register can be desynchronized (the recoding
// into a register process and a logic process that the thesis shows on
// exactly this counter). The limits and priorities are the thesis'.
module offset_counter_next
  import edge_pkg::*;
(
  input  logic                clr,
  input  logic                pause,
  input  logic [OFFSET_W-1:0] low_in,
  input  logic [MEMCOL_W-1:0] high_in,
  output logic [OFFSET_W-1:0] low_out,
  output logic [MEMCOL_W-1:0] high_out
);

  always_comb begin
    low_out  = low_in;
    high_out = high_in;
    if (clr) begin
      low_out  = '0;
      high_out = '0;
    end else if (pause) begin
      low_out  = low_in;
      high_out = high_in;
    end else if (low_in == OFFSET_W'(OFFSET_LAST)) begin
      low_out  = '0;
      high_out = (high_in == MEMCOL_W'(MEMCOL_LAST)) ? '0 : high_in + 1'b1;
    end else begin
      low_out  = low_in + 1'b1;
    end
  end

endmodule
