`timescale 1ns/1ps
// Self-checking testbench of the desynchronized accumulator.
//
// A four-phase provider offers the input sequence of the thesis (0, 1, 5)
// followed by random bytes on the input channel
// and a consumer acknowledges every output after a short, varying delay.
// The expected output stream is the reset token 0 followed by the running
// sums modulo 256, computed here independently. The testbench also checks
// that each output request comes no earlier than the matched delay after
// the input that produced it, and that back-pressure from a slow consumer
// stalls the input side. A watchdog ends the run if the circuit deadlocks.
module accu_async_tb;

  localparam int unsigned W      = 8;
  localparam int unsigned NUM    = 200;
  localparam real         DLY_NS = 0.4;   // 4 stages x 0.1 ns

  logic         rst;
  logic         in_req, in_ack, out_req, out_ack;
  logic [W-1:0] din, dout;

  int checks = 0, failures = 0;
  int n_out  = 0;
  int stalls = 0;
  logic [W-1:0] expected [$];
  realtime t_in_req [$];

  accu_async dut (
    .rst(rst), .in_req(in_req), .in_ack(in_ack), .din(din),
    .out_req(out_req), .out_ack(out_ack), .dout(dout)
  );

  // Provider: data valid before the request, held until the acknowledge.
  initial begin
    logic [W-1:0] acc;
    rst = 1; in_req = 0; din = '0; acc = '0;
    expected.push_back('0);               // reset token of Y
    #5 rst = 0;
    #5;
    for (int i = 0; i < NUM; i++) begin
      // the input sequence of the thesis' testbench first: 0, 1, 5
      din = (i == 0) ? W'(0) : (i == 1) ? W'(1) : (i == 2) ? W'(5) : W'($urandom);
      acc = acc + din;
      expected.push_back(acc);
      #1;
      in_req = 1;
      t_in_req.push_back($realtime);
      wait (in_ack);
      #0.5 in_req = 0;
      wait (!in_ack);
      // a handshake held up for long means the pipeline was full
      if ($realtime - t_in_req[$] > 20.0) stalls++;
      #0.5;
    end
  end

  // Consumer: captures on the rising request, acknowledges after a delay.
  initial begin
    out_ack = 0;
    wait (!rst);
    forever begin
      wait (out_req);
      checks++;
      if (expected.size() == 0) begin
        failures++;
        $display("ERROR: unexpected output %0d", dout);
      end else begin
        logic [W-1:0] e;
        e = expected.pop_front();
        if (dout !== e) begin
          failures++;
          $display("ERROR: output %0d = %0d, expected %0d", n_out, dout, e);
        end
      end
      if (n_out > 0) begin
        realtime t0;
        t0 = t_in_req.pop_front();
        checks++;
        if ($realtime - t0 < DLY_NS) begin
          failures++;
          $display("ERROR: output %0d came %0.3f ns after its input, before the matched delay",
                   n_out, $realtime - t0);
        end
      end
      n_out++;
      // The last output is never withdrawn: the fed-back copy of Y waits in
      // the join for an input that does not come.
      if (n_out == NUM + 1) begin
        #20;
        checks++;
        if (stalls == 0) begin
          failures++;
          $display("ERROR: a slow consumer never stalled the input");
        end
        checks++;
        if (expected.size() != 0) begin
          failures++;
          $display("ERROR: %0d outputs missing", expected.size());
        end
        $display("outputs=%0d stalls=%0d", n_out, stalls);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      // every 17th output the consumer is slow: the input side must stall
      if (n_out % 17 == 0) begin
        #30;
      end else begin
        #($urandom_range(1, 5));
      end
      out_ack = 1;
      wait (!out_req);
      #($urandom_range(1, 3)) out_ack = 0;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("ERROR: watchdog expired after %0d outputs", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
