`timescale 1ns/1ps
// Self-checking testbench of the handshake de-multiplexer (four outputs,
// one-hot select): the request must reach only the selected output, the
// acknowledge of that output must come back, an all-zero select must stall
// the input, and the output request must fall as soon as the input request
// falls.
module async_demux_tb;

  localparam int unsigned N = 4;

  logic         in_req, in_ack;
  logic [N-1:0] sel, out_req, out_ack;
  int checks = 0, failures = 0;

  async_demux #(.N(N)) dut (.sel(sel), .in_req(in_req), .in_ack(in_ack),
                            .out_req(out_req), .out_ack(out_ack));

  // receivers: acknowledge their own request after a delay
  for (genvar k = 0; k < N; k++) begin : g_rx
    initial begin
      out_ack[k] = 0;
      forever begin
        wait (out_req[k]);
        #($urandom_range(1, 3)) out_ack[k] = 1;
        wait (!out_req[k]);
        #($urandom_range(1, 3)) out_ack[k] = 0;
      end
    end
  end

  initial begin
    int hits [N];
    in_req = 0; sel = '0;
    foreach (hits[k]) hits[k] = 0;
    #1;
    in_req = 1; #5;
    checks++;
    if (out_req !== '0 || in_ack !== 0) begin
      failures++; $display("ERROR: request escaped with no output selected");
    end
    in_req = 0; #1;
    for (int t = 0; t < 80; t++) begin
      int k;
      k = $urandom_range(0, N-1);
      sel = N'(1) << k; #0.5;
      in_req = 1; #0.1;
      checks++;
      if (out_req !== (N'(1) << k)) begin
        failures++; $display("ERROR: out_req=%b for select %0d", out_req, k);
      end
      wait (in_ack);
      hits[k]++;
      in_req = 0; #0.1;
      checks++;
      if (out_req !== '0) begin failures++; $display("ERROR: out_req did not fall"); end
      wait (!in_ack);
      #0.5 sel = '0;
    end
    foreach (hits[k]) begin
      checks++;
      if (hits[k] == 0) begin failures++; $display("ERROR: output %0d never used", k); end
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
