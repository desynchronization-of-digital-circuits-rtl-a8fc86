`timescale 1ns/1ps
// Self-checking testbench of the Muller C element: exhaustive truth table of
// the two-input gate (every input pair from every held output value, as in
// the thesis' table), a random walk on a three-input gate checked against a
// reference model, and the reset value.
module c_element_tb;

  logic       rst;
  logic [1:0] in2;
  logic [2:0] in3;
  logic       y2, y3;
  int checks = 0, failures = 0;

  c_element #(.N(2))             dut2 (.rst(rst), .in(in2), .out(y2));
  c_element #(.N(3), .INIT(1'b1)) dut3 (.rst(rst), .in(in3), .out(y3));

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("ERROR: %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    logic model;
    rst = 1; in2 = 2'b01; in3 = 3'b010;
    #1 check(y2, 1'b0, "reset INIT=0");
    check(y3, 1'b1, "reset INIT=1");
    rst = 0;
    // truth table: for each held value yin, apply each input pair
    for (int yin = 0; yin < 2; yin++)
      for (int ab = 0; ab < 4; ab++) begin
        in2 = {2{1'(yin)}}; #1;       // set the held value
        check(y2, 1'(yin), "set held value");
        in2 = 2'(ab); #1;
        check(y2, (ab == 3) ? 1'b1 : (ab == 0) ? 1'b0 : 1'(yin), "truth table");
      end
    model = y3;
    for (int i = 0; i < 300; i++) begin
      in3 = 3'($urandom); #1;
      if (in3 == 3'b111) model = 1;
      else if (in3 == 3'b000) model = 0;
      check(y3, model, "3-input walk");
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
