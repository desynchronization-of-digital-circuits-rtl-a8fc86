`timescale 1ns/1ps
// Self-checking testbench of the accumulator's adder: corner cases and
// random operands against an integer sum taken modulo 256.
module accu_adder_tb;

  logic [7:0] a, b, sum;
  int checks = 0, failures = 0;

  accu_adder #(.WIDTH(8)) dut (.a(a), .b(b), .sum(sum));

  task automatic try(int x, int y);
    a = 8'(x); b = 8'(y); #1;
    checks++;
    if (int'(sum) != (x + y) % 256) begin
      failures++;
      $display("ERROR: %0d + %0d = %0d", x, y, sum);
    end
  endtask

  initial begin
    try(0, 0); try(1, 3); try(255, 1); try(255, 255); try(128, 128);
    for (int i = 0; i < 500; i++) try($urandom_range(0, 255), $urandom_range(0, 255));
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
