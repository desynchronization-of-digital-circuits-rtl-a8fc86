`timescale 1ns/1ps
// Self-checking testbench of the coarse-grained desynchronized GCD.
//
// The testbench plays the synchronous environment of the original GCD, one
// algorithm step per handshake: on each output request it reads
// output_valid and data_out, chooses input_valid and data_in for the next
// step (present A until acknowledged, withdraw, present B until the result
// is acknowledged, withdraw), then completes the handshakes on both
// channels. Results are compared with Euclid's algorithm computed here. The
// thesis' worked example GCD(56, 12) = 4 and GCD(156, 30) = 6 come first,
// then random non-zero operand pairs. A watchdog ends a deadlocked run.
module gcd_async_tb;

  localparam int unsigned W     = 8;
  localparam int unsigned PAIRS = 40;

  logic         rst;
  logic         input_valid, in_req, in_ack, out_req, out_ack, output_valid;
  logic [W-1:0] data_in, data_out;

  int checks = 0, failures = 0, steps = 0;

  gcd_async dut (
    .rst(rst), .input_valid(input_valid), .data_in(data_in),
    .in_req(in_req), .in_ack(in_ack), .out_req(out_req), .out_ack(out_ack),
    .output_valid(output_valid), .data_out(data_out)
  );

  function automatic int unsigned euclid(int unsigned a, int unsigned b);
    while (b != 0) begin
      int unsigned t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // One algorithm step: the output token is present (out_req high); apply
  // the next inputs and complete one handshake on each channel. Returns the
  // output_valid / data_out seen at the following token.
  task automatic step(input logic iv, input logic [W-1:0] d,
                      output logic ov, output logic [W-1:0] res);
    wait (!in_ack);
    input_valid = iv;
    data_in     = d;
    #1;
    in_req  = 1;
    out_ack = 1;
    wait (in_ack);
    #0.5 in_req = 0;
    wait (!out_req);
    #0.5 out_ack = 0;
    wait (out_req);
    steps++;
    #0.2;
    ov  = output_valid;
    res = data_out;
  endtask

  task automatic run_gcd(input logic [W-1:0] a, input logic [W-1:0] b);
    logic ov;
    logic [W-1:0] res;
    int guard;
    int s0;
    s0 = steps;
    // operand A until acknowledged, then withdraw until ack falls
    guard = 0;
    do begin step(1'b1, a, ov, res); guard++; end while (!ov && guard < 10);
    do begin step(1'b0, a, ov, res); guard++; end while (ov && guard < 20);
    // operand B until the result is acknowledged
    guard = 0;
    do begin step(1'b1, b, ov, res); guard++; end while (!ov && guard < 2000);
    checks++;
    if (res !== W'(euclid(a, b))) begin
      failures++;
      $display("ERROR: GCD(%0d,%0d) = %0d, expected %0d", a, b, res, euclid(a, b));
    end
    // withdraw; ack must fall
    guard = 0;
    do begin step(1'b0, b, ov, res); guard++; end while (ov && guard < 10);
    checks++;
    if (ov) begin
      failures++;
      $display("ERROR: GCD(%0d,%0d): ack never fell", a, b);
    end
    // every subtraction costs at least one handshake with the environment
    checks++;
    if (steps - s0 < 4) begin
      failures++;
      $display("ERROR: GCD(%0d,%0d) took only %0d steps", a, b, steps - s0);
    end
  endtask

  initial begin
    rst = 1; in_req = 0; out_ack = 0; input_valid = 0; data_in = '0;
    #5 rst = 0;
    wait (out_req);               // initial token after reset
    checks++;
    if (output_valid !== 1'b0) begin
      failures++;
      $display("ERROR: ack high after reset");
    end
    run_gcd(8'd56, 8'd12);
    run_gcd(8'd156, 8'd30);
    run_gcd(8'd17, 8'd17);
    run_gcd(8'd1, 8'd255);
    for (int i = 0; i < PAIRS; i++)
      run_gcd(W'($urandom_range(1, 255)), W'($urandom_range(1, 255)));
    $display("steps=%0d", steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("ERROR: watchdog expired after %0d steps", steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
