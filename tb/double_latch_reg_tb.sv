`timescale 1ns/1ps
// Self-checking testbench of the double latch register. The two latch
// controls are driven in the non-overlapping order a double latch controller
// produces (close master, open slave, close slave, open master) and the
// output is compared with a flip-flop model: q changes only when the slave
// opens, to the value d had when the master closed. Reset value checked.
module double_latch_reg_tb;

  logic        rst, lt_m, lt_s;
  logic [15:0] d, q;
  int checks = 0, failures = 0;

  double_latch_reg #(.WIDTH(16), .RESET_VAL(16'h1234)) dut (
    .rst(rst), .lt_m(lt_m), .lt_s(lt_s), .d(d), .q(q));

  task automatic check(logic [15:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("ERROR: %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    logic [15:0] ff, captured;
    rst = 1; lt_m = 0; lt_s = 1; d = 16'h0;
    #1 check(16'h1234, "reset");
    rst = 0;
    ff = 16'h1234;
    for (int i = 0; i < 100; i++) begin
      d = 16'($urandom); #1;
      check(ff, "master open, slave closed");
      captured = d;
      lt_m = 1; #1;                      // master captures
      d = 16'($urandom); #1;
      check(ff, "master closed, slave closed");
      lt_s = 0; #1;                      // slave passes the captured value
      ff = captured;
      check(ff, "slave open");
      d = 16'($urandom); #1;
      check(ff, "master holds while slave open");
      lt_s = 1; #1;
      lt_m = 0; #1;
      d = 16'($urandom); #1;
      check(ff, "slave holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
