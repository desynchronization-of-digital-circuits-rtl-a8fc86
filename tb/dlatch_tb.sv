`timescale 1ns/1ps
// Self-checking testbench of the data latch: reset value, transparency while
// the control is 0, holding while it is 1 under changing data.
module dlatch_tb;

  logic       rst, ctrl;
  logic [7:0] d, q;
  int checks = 0, failures = 0;

  dlatch #(.WIDTH(8), .RESET_VAL(8'hA5)) dut (.rst(rst), .ctrl(ctrl), .d(d), .q(q));

  task automatic check(logic [7:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("ERROR: %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    logic [7:0] held;
    rst = 1; ctrl = 1; d = 8'h00;
    #1 check(8'hA5, "reset");
    rst = 0;
    held = 8'hA5;
    for (int i = 0; i < 200; i++) begin
      ctrl = 1'($urandom);
      d    = 8'($urandom);
      #1;
      if (!ctrl) held = d;
      check(held, ctrl ? "opaque" : "transparent");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
