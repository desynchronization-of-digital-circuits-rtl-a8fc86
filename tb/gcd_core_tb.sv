`timescale 1ns/1ps
// Self-checking testbench of the GCD core. The testbench holds A, B and the
// state in its own variables, as clocked registers would, and applies the
// core's next values once per step. It checks the state codes of the
// operand exchange, the result against Euclid's algorithm, that ack is low
// while computing, that reset forces WAIT_A, and that an unused state code
// recovers to WAIT_A.
module gcd_core_tb;
  import gcd_pkg::*;

  logic       reset, req, ack;
  logic [7:0] ab, c, ra, na, rb, nb;
  logic [2:0] st, nst;
  int checks = 0, failures = 0;

  gcd_core dut (.reset(reset), .req(req), .ab(ab), .ack(ack), .c(c),
                .reg_a(ra), .next_reg_a(na), .reg_b(rb), .next_reg_b(nb),
                .state(st), .next_state(nst));

  function automatic int unsigned euclid(int unsigned a, int unsigned b);
    while (b != 0) begin
      int unsigned t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("ERROR: %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic tick();
    #1;
    ra = na; rb = nb; st = nst;
    #1;
  endtask

  task automatic run(int unsigned a, int unsigned b);
    int n;
    req = 1; ab = 8'(a); tick();
    check(st, SET_ACKA, "A loaded -> SET_ACKA");
    check(ack, 1, "ack for A");
    check(ra, a, "A register");
    req = 0; tick();
    check(st, WAIT_B, "-> WAIT_B");
    check(ack, 0, "ack withdrawn");
    req = 1; ab = 8'(b); tick();
    check(st, EQUAL_CHECK, "B loaded -> EQUAL_CHECK");
    n = 0;
    while (!ack && n < 1000) begin
      tick(); n++;
    end
    check(st, RESET_ACK, "result state");
    check(c, euclid(a, b), "result");
    req = 0; tick();
    check(st, WAIT_A, "back to WAIT_A");
    check(ack, 0, "ack low in WAIT_A");
  endtask

  initial begin
    reset = 1; req = 0; ab = 0; ra = 0; rb = 0; st = 3'b101;
    #1 check(nst, WAIT_A, "reset");
    reset = 0;
    st = 3'b111; #1 check(nst, WAIT_A, "unused code recovers");
    st = WAIT_A; #1;
    check(nst, WAIT_A, "idle without req");
    run(56, 12);
    run(156, 30);
    run(200, 200);
    for (int i = 0; i < 100; i++) run($urandom_range(1, 255), $urandom_range(1, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
