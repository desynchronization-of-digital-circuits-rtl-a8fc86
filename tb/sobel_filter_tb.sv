`timescale 1ns/1ps
// Self-checking testbench of sobel_filter: flat windows give 0, a vertical
// and a horizontal step give the expected saturated and unsaturated
// strengths, and random windows are compared with a reference computed here
// in integer arithmetic.
module sobel_filter_tb;
  import edge_pkg::*;

  logic [8:0][PIXEL_W-1:0] win;
  logic [PIXEL_W-1:0]      px;
  int checks = 0, failures = 0;

  sobel_filter dut (.win(win), .pixel(px));

  function automatic int ref_sobel(logic [8:0][PIXEL_W-1:0] w);
    int gx, gy, m;
    gx = (int'(w[2]) + 2*int'(w[5]) + int'(w[8])) - (int'(w[0]) + 2*int'(w[3]) + int'(w[6]));
    gy = (int'(w[6]) + 2*int'(w[7]) + int'(w[8])) - (int'(w[0]) + 2*int'(w[1]) + int'(w[2]));
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return m > 255 ? 255 : m;
  endfunction

  task automatic check(int exp, string what);
    #1;
    checks++;
    if (px !== PIXEL_W'(exp)) begin
      failures++;
      $display("ERROR: %s: got %0d expected %0d", what, px, exp);
    end
  endtask

  initial begin
    #100000 $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 9; i++) win[i] = 8'd77;
    check(0, "flat window");
    // left column 10, right column 20: Gx = 4*10 = 40, Gy = 0
    win = {8'd20, 8'd15, 8'd10, 8'd20, 8'd15, 8'd10, 8'd20, 8'd15, 8'd10};
    check(40, "gentle vertical step");
    // top row 0, bottom row 255: Gy = 1020, saturates
    win = {8'd255, 8'd255, 8'd255, 8'd9, 8'd9, 8'd9, 8'd0, 8'd0, 8'd0};
    check(255, "strong horizontal step");
    for (int n = 0; n < 600; n++) begin
      for (int i = 0; i < 9; i++) win[i] = ($urandom_range(0, 3) == 0) ? 8'($urandom) : 8'($urandom_range(100, 110));
      check(ref_sobel(win), "random window");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
