`timescale 1ns/1ps
// Double (master/slave) latch controller.
//
// Every flip-flop register of the synchronous design becomes a master latch
// followed by a slave latch, and this block replaces the clock of such a
// pair: two semi-decoupled controllers in series, the first driving the
// master latch control `lt_m`, the second the slave latch control `lt_s`.
// The channel `in_req`/`in_ack` enters the master controller, the master's
// output channel drives the slave controller, and the slave's output
// channel is `out_req`/`out_ack`.
//
// As in the thesis, the slave starts opposite to the master: after reset
// the master is empty and transparent and, with INIT_TOKEN = 1, the slave is
// opaque and already offers its (reset) contents downstream with `out_req`
// high. That token stands for the value a clocked register holds after
// reset. INIT_TOKEN = 0 starts both halves empty, which this design uses for
// an input register that must wait for its first datum.
//
// Timing: no clock; see semi_decoupled_ctrl.
module double_latch_ctrl #(
  parameter bit INIT_TOKEN = 1'b1
) (
  input  logic rst,
  input  logic in_req,
  output logic in_ack,
  output logic out_req,
  input  logic out_ack,
  output logic lt_m,
  output logic lt_s
);

  logic ms_req, ms_ack;

  semi_decoupled_ctrl #(.INIT(1'b0)) u_master (
    .rst    (rst),
    .in_req (in_req),
    .in_ack (in_ack),
    .out_req(ms_req),
    .out_ack(ms_ack),
    .lt     (lt_m)
  );

  semi_decoupled_ctrl #(.INIT(INIT_TOKEN)) u_slave (
    .rst    (rst),
    .in_req (ms_req),
    .in_ack (ms_ack),
    .out_req(out_req),
    .out_ack(out_ack),
    .lt     (lt_s)
  );

endmodule
