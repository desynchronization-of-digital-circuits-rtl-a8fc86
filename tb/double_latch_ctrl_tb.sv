`timescale 1ns/1ps
// Self-checking testbench of the double latch controller.
//
// Checks the reset state of both variants (with and without an initial
// token), then builds a two-register pipeline, each register a
// double_latch_reg driven by a double_latch_ctrl, the first empty and the
// second holding the reset token 0xEE. A provider pushes random bytes and a
// randomly slow consumer takes them; the consumer must see the token first,
// then every byte in order. With the consumer stopped, the empty register
// must take two bytes (its master and slave each hold one) and the token
// register one more in its master, its slave still holding the token: three
// bytes in all.
module double_latch_ctrl_tb;

  localparam int unsigned N = 150;

  logic rst;
  int checks = 0, failures = 0;

  logic r0, a0, r1, a1, r2, a2;
  logic m0, s0, m1, s1;
  logic [7:0] din, q0, q1;

  double_latch_ctrl #(.INIT_TOKEN(1'b0)) u_c0 (
    .rst(rst), .in_req(r0), .in_ack(a0), .out_req(r1), .out_ack(a1), .lt_m(m0), .lt_s(s0));
  double_latch_reg  #(.WIDTH(8)) u_r0 (.rst(rst), .lt_m(m0), .lt_s(s0), .d(din), .q(q0));
  double_latch_ctrl #(.INIT_TOKEN(1'b1)) u_c1 (
    .rst(rst), .in_req(r1), .in_ack(a1), .out_req(r2), .out_ack(a2), .lt_m(m1), .lt_s(s1));
  double_latch_reg  #(.WIDTH(8), .RESET_VAL(8'hEE)) u_r1 (.rst(rst), .lt_m(m1), .lt_s(s1), .d(q0), .q(q1));

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("ERROR: %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [7:0] exp_q [$];
  int accepted;

  initial begin
    rst = 1; r0 = 0; a2 = 0; din = 0;
    #2;
    check(r1, 0, "empty: no out_req"); check(m0, 0, "empty: master open");
    check(s0, 0, "empty: slave open");
    check(r2, 1, "token: out_req"); check(m1, 0, "token: master open");
    check(s1, 1, "token: slave closed"); check(q1, 8'hEE, "token value");
    rst = 0;
    // fill with the consumer stopped
    accepted = 0;
    for (int k = 0; k < 8; k++) begin
      din = 8'(8'hA0 + k);
      #1 r0 = 1;
      fork begin wait (a0); end begin #40; end join_any
      disable fork;
      if (!a0) break;
      accepted++;
      exp_q.push_back(din);
      #1 r0 = 0;
      fork begin wait (!a0); end begin #40; end join_any
      disable fork;
      if (a0) break;
    end
    checks++;
    if (accepted != 3) begin
      failures++;
      $display("ERROR: %0d bytes accepted with the consumer stopped, expected 3", accepted);
    end
    // let the consumer run: token first
    wait (r2);
    check(q1, 8'hEE, "first out is the token");
    #1 a2 = 1; wait (!r2); #1 a2 = 0;
    // stream
    fork
      begin
        for (int k = 0; k < N; k++) begin
          #($urandom_range(0, 4));
          wait (!a0);
          din = 8'($urandom);
          exp_q.push_back(din);
          #1 r0 = 1;
          wait (a0);
          #0.5 r0 = 0;
          wait (!a0);
        end
      end
      begin
        for (int k = 0; k < N + accepted; k++) begin
          wait (r2);
          if (exp_q.size() == 0) begin
            failures++; checks++;
            $display("ERROR: output without input");
          end else begin check(q1, exp_q.pop_front(), "stream order"); end
          #($urandom_range(1, 6)) a2 = 1;
          wait (!r2);
          #0.5 a2 = 0;
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
