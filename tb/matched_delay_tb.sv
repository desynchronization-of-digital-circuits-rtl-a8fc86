`timescale 1ns/1ps
// Self-checking testbench of the matched delay model: the rising edge must
// arrive STAGES x STAGE_DELAY_NS after the input (2 ns for the default 20
// gates of 0.1 ns, and 10 ns for a 100-gate instance), the falling edge one
// gate delay after the input, and a request withdrawn before it got through
// must not appear at the output.
module matched_delay_tb;

  logic din, d20, d100;
  int checks = 0, failures = 0;

  matched_delay                  dut20  (.din(din), .dout(d20));
  matched_delay #(.STAGES(100))  dut100 (.din(din), .dout(d100));

  task automatic near(realtime got, realtime exp, string what);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("ERROR: %s: %0.3f ns, expected %0.3f ns", what, got, exp);
    end
  endtask

  initial begin
    realtime t0, t20, t100;
    din = 0;
    #20;
    for (int i = 0; i < 5; i++) begin
      din = 1; t0 = $realtime;
      fork
        begin wait (d20);  t20  = $realtime; end
        begin wait (d100); t100 = $realtime; end
      join
      near(t20 - t0, 2.0, "rise, 20 gates");
      near(t100 - t0, 10.0, "rise, 100 gates");
      #3;
      din = 0; t0 = $realtime;
      fork
        begin wait (!d20);  t20  = $realtime; end
        begin wait (!d100); t100 = $realtime; end
      join
      near(t20 - t0, 0.1, "fall, 20 gates");
      near(t100 - t0, 0.1, "fall, 100 gates");
      #($urandom_range(1, 5));
    end
    // a 1 ns pulse is shorter than the 2 ns delay: nothing comes out
    din = 1; #1 din = 0;
    #5;
    checks++;
    if (d20 !== 1'b0) begin failures++; $display("ERROR: short pulse leaked"); end
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
