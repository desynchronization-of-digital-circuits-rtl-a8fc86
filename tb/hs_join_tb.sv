`timescale 1ns/1ps
// Self-checking testbench of the handshake join (three inputs): the merged
// request must rise only when every sender has requested and fall only when
// all have withdrawn; the acknowledge must be copied to every sender.
// Senders act in random order with random delays.
module hs_join_tb;

  localparam int unsigned N = 3;

  logic         rst, out_req, out_ack;
  logic [N-1:0] in_req, in_ack;
  int checks = 0, failures = 0;

  hs_join #(.N(N)) dut (.rst(rst), .in_req(in_req), .in_ack(in_ack),
                        .out_req(out_req), .out_ack(out_ack));

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("ERROR: %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; in_req = '0; out_ack = 0;
    #1 rst = 0;
    check(out_req, 0, "reset");
    for (int t = 0; t < 50; t++) begin
      for (int k = 0; k < N; k++) begin
        int idx;
        do idx = $urandom_range(0, N-1); while (in_req[idx]);
        #($urandom_range(1, 3));
        check(out_req, 0, "request before all senders");
        in_req[idx] = 1; #0.1;
      end
      check(out_req, 1, "request after all senders");
      out_ack = 1; #0.1;
      checks++;
      if (in_ack !== '1) begin failures++; $display("ERROR: ack not copied"); end
      for (int k = 0; k < N; k++) begin
        int idx;
        do idx = $urandom_range(0, N-1); while (!in_req[idx]);
        #($urandom_range(1, 3));
        check(out_req, 1, "request held until all withdrawn");
        in_req[idx] = 0; #0.1;
      end
      check(out_req, 0, "request released");
      out_ack = 0; #0.1;
      checks++;
      if (in_ack !== '0) begin failures++; $display("ERROR: ack release not copied"); end
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
