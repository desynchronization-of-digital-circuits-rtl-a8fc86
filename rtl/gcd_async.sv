`timescale 1ns/1ps
// Desynchronized GCD, coarse grained: one controller for all registers.
//
// The three registers of the synchronous GCD (operand A, operand B, FSM
// state) are replaced by double latches that share one double latch
// controller; gcd_core supplies their next values. The clock is replaced by
// two handshake channels:
//
//   in_req --> JOIN --> [ctrl] --> FORK --> out_req
//               ^                   |
//               +-- matched delay --+   (internal loop through gcd_core)
//
// The join waits for the environment's request and for the delayed internal
// request announcing that gcd_core has settled; the fork offers every new
// register value both to the environment and back to the join. Each full
// handshake on both channels is one step of the algorithm, so the circuit
// handshakes with the environment on every step, as the thesis observes.
//
// Data: `input_valid` and `data_in` are the original req and operand bus and
// are sampled when the controller captures, so they must be stable from
// before `in_req` rises until `in_ack` rises. `output_valid` (the original
// ack) and `data_out` (the result) are valid while `out_req` is high.
//
// Reset: the slave latches hold the reset values (state WAIT_A, A = B = 0)
// as the initial token. The matched delay defaults to 100 gates of 0.1 ns =
// 10 ns, the value the thesis inserted after measuring about 5 ns per step.
// The handshake network contains loops and set/reset latches by design.
module gcd_async
  import gcd_pkg::*;
#(
  parameter int unsigned WIDTH          = GCD_WIDTH,
  parameter int unsigned DELAY_STAGES   = 100,
  parameter real         STAGE_DELAY_NS = 0.1
) (
  input  logic             rst,
  input  logic             input_valid,
  input  logic [WIDTH-1:0] data_in,
  input  logic             in_req,
  output logic             in_ack,
  output logic             out_req,
  input  logic             out_ack,
  output logic             output_valid,
  output logic [WIDTH-1:0] data_out
);

  logic             int_req, int_req_d, int_ack;
  logic             j_req, j_ack, c_req, c_ack;
  logic             lt_m, lt_s;
  logic [1:0]       j_in_ack, f_req, f_ack;
  logic [WIDTH-1:0] reg_a, next_a, reg_b, next_b;
  logic [2:0]       state, next_state;

  gcd_core #(.WIDTH(WIDTH)) u_core (
    .reset(rst), .req(input_valid), .ab(data_in), .ack(output_valid), .c(data_out),
    .reg_a(reg_a), .next_reg_a(next_a), .reg_b(reg_b), .next_reg_b(next_b),
    .state(state), .next_state(next_state)
  );

  matched_delay #(.STAGES(DELAY_STAGES), .STAGE_DELAY_NS(STAGE_DELAY_NS)) u_delay (
    .din(int_req), .dout(int_req_d)
  );

  // [0] = environment, [1] = internal loop
  hs_join #(.N(2)) u_join (
    .rst(rst), .in_req({int_req_d, in_req}), .in_ack(j_in_ack),
    .out_req(j_req), .out_ack(j_ack)
  );
  assign in_ack  = j_in_ack[0];
  assign int_ack = j_in_ack[1];

  double_latch_ctrl #(.INIT_TOKEN(1'b1)) u_ctrl (
    .rst(rst), .in_req(j_req), .in_ack(j_ack),
    .out_req(c_req), .out_ack(c_ack), .lt_m(lt_m), .lt_s(lt_s)
  );

  // [0] = environment, [1] = internal loop
  hs_fork #(.N(2)) u_fork (
    .rst(rst), .in_req(c_req), .in_ack(c_ack), .out_req(f_req), .out_ack(f_ack)
  );
  assign out_req  = f_req[0];
  assign int_req  = f_req[1];
  assign f_ack    = {int_ack, out_ack};

  double_latch_reg #(.WIDTH(WIDTH)) u_reg_a (
    .rst(rst), .lt_m(lt_m), .lt_s(lt_s), .d(next_a), .q(reg_a)
  );
  double_latch_reg #(.WIDTH(WIDTH)) u_reg_b (
    .rst(rst), .lt_m(lt_m), .lt_s(lt_s), .d(next_b), .q(reg_b)
  );
  double_latch_reg #(.WIDTH(3), .RESET_VAL(3'(WAIT_A))) u_reg_state (
    .rst(rst), .lt_m(lt_m), .lt_s(lt_s), .d(next_state), .q(state)
  );

endmodule
