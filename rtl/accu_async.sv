`timescale 1ns/1ps
// Desynchronized 8-bit accumulator: y(t+1) = x(t) + y(t).
//
// The synchronous original has an input register X, an adder and an output
// register Y whose value is fed back to the adder. Desynchronizing it keeps
// the adder and replaces each register by a double latch with its own
// double latch controller:
//
//   in_req --> [X ctrl] --x_req--> JOIN --> matched delay --> [Y ctrl] --> FORK --> out_req
//                                   ^                                       |
//                                   +--------------- y feedback ------------+
//
// The join makes Y wait until both adder operands are valid; the matched
// delay, placed between the join and Y, covers the adder; the fork sends Y
// both to the environment and back to the join. The acknowledge path of
// that feedback loop (Y's controller, the fork's C element, the join) is a
// closed loop of handshake gates, which Verilator reports as UNOPTFLAT
// (circular combinational logic); the loop is the accumulator's feedback
// and is broken in time by the controllers' state, as in any
// desynchronized circuit with a register feeding itself.
//
// Interface: a four-phase push channel in (`in_req`, `in_ack`, data `din`,
// valid before `in_req` rises and until `in_ack` rises) and one out
// (`out_req`, `out_ack`, data `dout`, valid while `out_req` is high). The
// environment must acknowledge the output; the thesis ties out_req back to
// out_ack ("eager consumer") for test.
//
// Reset: Y starts holding a token with value 0, which is offered on the
// output first; X starts empty, so the first output after that is the first
// input. The empty X register is this design's choice (it makes the output
// sequence 0, x0, x0+x1, ... the one the thesis shows). The matched delay is
// 4 gates of 0.1 ns, the smallest even chain covering the 300 ps the thesis
// chose after measuring a 200 ps adder.
module accu_async #(
  parameter int unsigned WIDTH        = 8,
  parameter int unsigned DELAY_STAGES = 4,
  parameter real         STAGE_DELAY_NS = 0.1
) (
  input  logic             rst,
  input  logic             in_req,
  output logic             in_ack,
  input  logic [WIDTH-1:0] din,
  output logic             out_req,
  input  logic             out_ack,
  output logic [WIDTH-1:0] dout
);

  logic             x_req, x_ack, xm, xs;
  logic             j_req, j_req_d, j_ack;
  logic             y_req, y_ack, ym, ys;
  logic [1:0]       f_req, f_ack;
  logic [WIDTH-1:0] x_q, y_q, sum;

  // Input register X, empty after reset.
  double_latch_ctrl #(.INIT_TOKEN(1'b0)) u_x_ctrl (
    .rst(rst), .in_req(in_req), .in_ack(in_ack),
    .out_req(x_req), .out_ack(x_ack), .lt_m(xm), .lt_s(xs)
  );
  double_latch_reg #(.WIDTH(WIDTH)) u_x_reg (
    .rst(rst), .lt_m(xm), .lt_s(xs), .d(din), .q(x_q)
  );

  // Join of the two adder operands: [0] = X, [1] = fed-back Y.
  hs_join #(.N(2)) u_join (
    .rst(rst), .in_req({f_req[1], x_req}), .in_ack({f_ack[1], x_ack}),
    .out_req(j_req), .out_ack(j_ack)
  );

  matched_delay #(.STAGES(DELAY_STAGES), .STAGE_DELAY_NS(STAGE_DELAY_NS)) u_delay (
    .din(j_req), .dout(j_req_d)
  );

  accu_adder #(.WIDTH(WIDTH)) u_add (.a(x_q), .b(y_q), .sum(sum));

  // Output register Y, holding the reset value 0 as its first token.
  double_latch_ctrl #(.INIT_TOKEN(1'b1)) u_y_ctrl (
    .rst(rst), .in_req(j_req_d), .in_ack(j_ack),
    .out_req(y_req), .out_ack(y_ack), .lt_m(ym), .lt_s(ys)
  );
  double_latch_reg #(.WIDTH(WIDTH)) u_y_reg (
    .rst(rst), .lt_m(ym), .lt_s(ys), .d(sum), .q(y_q)
  );

  // Fork of Y: [0] = environment, [1] = feedback to the join.
  hs_fork #(.N(2)) u_fork (
    .rst(rst), .in_req(y_req), .in_ack(y_ack), .out_req(f_req), .out_ack(f_ack)
  );

  assign out_req  = f_req[0];
  assign f_ack[0] = out_ack;
  assign dout     = y_q;

endmodule
