`timescale 1ns/1ps
// Semi-decoupled four-phase latch controller for one latch.
//
// The controller replaces the clock of one latch. It talks four-phase
// bundled data, push channel, on both sides: `in_req`/`in_ack` towards the
// previous stage and `out_req`/`out_ack` towards the next one. Its internal
// state variable A is also the latch control `lt` (1 = latch opaque) and the
// input acknowledge. The set and reset functions of the two state-holding
// signals are
//
//   A+  = Ri * /Ro          A-  = /Ri * Ro * Ao
//   Ro+ = A  * /Ao          Ro- = /A
//   Ai  = A ,  Lt = A
//
// so a new input handshake may begin as soon as Ro has fallen, even while
// the next stage still holds Ao high; unlike the simple (Muller pipeline)
// controller, every latch of a pipeline built from these can hold data.
//
// INIT selects the state after reset: 0 = empty (latch transparent, no
// request), 1 = holding a token (latch opaque, Ro and Ai high). The
// equations follow the thesis; the `rst` input and the INIT parameter follow
// its reference model, which initialises A, Ro and the latch control to a
// per-instance value.
//
// Timing: no clock. Each of A and Ro is a generalized (asymmetric) C element
// written as a set/reset latch, so a synthesis tool reports two latches;
// they are the controller's intended state, and the loops through them are
// the handshake itself (Verilator reports the loop through Ro as UNOPTFLAT,
// circular combinational logic; it is the feedback of the C element). Each C element output carries a propagation delay
// of GATE_DELAY_NS in simulation (a synthesis tool ignores it). Without it,
// a zero-delay simulator may evaluate one C element on a stale value of the
// other within one time step, which no real gate can do; the thesis' own
// reference model likewise gives these gates 1 to 2 ns.
module semi_decoupled_ctrl #(
  parameter bit  INIT          = 1'b0,
  parameter real GATE_DELAY_NS = 0.1
) (
  input  logic rst,
  input  logic in_req,    // Ri
  output logic in_ack,    // Ai
  output logic out_req,   // Ro
  input  logic out_ack,   // Ao
  output logic lt         // latch control, 1 = opaque
);

  logic a, a_q, ro_q;

  always_latch begin
    if (rst)                                a_q = INIT;
    else if (in_req && !out_req)            a_q = 1'b1;
    else if (!in_req && out_req && out_ack) a_q = 1'b0;
  end

  always_latch begin
    if (rst)                  ro_q = INIT;
    else if (a && !out_ack)   ro_q = 1'b1;
    else if (!a)              ro_q = 1'b0;
  end

  // gate propagation delay of the two generalized C elements (simulation only)
  assign #(GATE_DELAY_NS) a       = a_q;
  assign #(GATE_DELAY_NS) out_req = ro_q;

  assign in_ack = a;
  assign lt     = a;

endmodule
