`timescale 1ns/1ps
// Desynchronized offset counter of the edge detector.
//
// The counter's 9-bit register (2-bit low part, 7-bit column part) becomes a
// double latch with its own double latch controller. As in the thesis'
// desynchronized FSM, a join in front of the controller waits for both the
// request of the block that drives the counter's control inputs (`in_req`,
// with `clr` and `pause` as bundled data) and the counter's own previous
// value, and a fork after it sends the new count both out of the block
// (`out_req`, with `count_low`/`count_high`) and back into the join through
// a matched delay that covers offset_counter_next:
//
//   in_req --> JOIN --> [ctrl] --> FORK --> out_req
//               ^                   |
//               +-- matched delay --+
//
// The counter's register feeds its own next-count logic; lint reports that
// path through the latches as circular logic (UNOPTFLAT), see
// double_latch_reg. One handshake on each channel is one count step. After reset the register
// holds the token 0/0, which is offered on the output first. The delay of
// 20 gates (2 ns) is this design's choice; the thesis gives none for it.
module offset_counter_async
  import edge_pkg::*;
#(
  parameter int unsigned DELAY_STAGES   = 20,
  parameter real         STAGE_DELAY_NS = 0.1
) (
  input  logic                rst,
  input  logic                clr,
  input  logic                pause,
  input  logic                in_req,
  output logic                in_ack,
  output logic                out_req,
  input  logic                out_ack,
  output logic [OFFSET_W-1:0] count_low,
  output logic [MEMCOL_W-1:0] count_high
);

  localparam int unsigned CW = OFFSET_W + MEMCOL_W;

  logic          loop_req, loop_req_d, loop_ack;
  logic          j_req, j_ack, c_req, c_ack, lt_m, lt_s;
  logic [1:0]    j_in_ack, f_req;
  logic [OFFSET_W-1:0] low_next;
  logic [MEMCOL_W-1:0] high_next;

  offset_counter_next u_next (
    .clr(clr), .pause(pause), .low_in(count_low), .high_in(count_high),
    .low_out(low_next), .high_out(high_next)
  );

  matched_delay #(.STAGES(DELAY_STAGES), .STAGE_DELAY_NS(STAGE_DELAY_NS)) u_delay (
    .din(loop_req), .dout(loop_req_d)
  );

  hs_join #(.N(2)) u_join (
    .rst(rst), .in_req({loop_req_d, in_req}), .in_ack(j_in_ack),
    .out_req(j_req), .out_ack(j_ack)
  );
  assign in_ack   = j_in_ack[0];
  assign loop_ack = j_in_ack[1];

  double_latch_ctrl #(.INIT_TOKEN(1'b1)) u_ctrl (
    .rst(rst), .in_req(j_req), .in_ack(j_ack),
    .out_req(c_req), .out_ack(c_ack), .lt_m(lt_m), .lt_s(lt_s)
  );

  hs_fork #(.N(2)) u_fork (
    .rst(rst), .in_req(c_req), .in_ack(c_ack), .out_req(f_req), .out_ack({loop_ack, out_ack})
  );
  assign out_req  = f_req[0];
  assign loop_req = f_req[1];

  double_latch_reg #(.WIDTH(CW)) u_reg (
    .rst(rst), .lt_m(lt_m), .lt_s(lt_s),
    .d({high_next, low_next}), .q({count_high, count_low})
  );

endmodule
