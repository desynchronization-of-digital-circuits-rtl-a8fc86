`timescale 1ns/1ps
// Self-checking testbench of the handshake fork (three outputs): the request
// must reach every output at once, and the merged acknowledge must rise
// only when every receiver has acknowledged and fall only when every one
// has withdrawn. Receivers answer in random order with random delays.
module hs_fork_tb;

  localparam int unsigned N = 3;

  logic         rst, in_req, in_ack;
  logic [N-1:0] out_req, out_ack;
  int checks = 0, failures = 0;

  hs_fork #(.N(N)) dut (.rst(rst), .in_req(in_req), .in_ack(in_ack),
                        .out_req(out_req), .out_ack(out_ack));

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("ERROR: %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; in_req = 0; out_ack = '0;
    #1 rst = 0;
    check(in_ack, 0, "reset");
    for (int t = 0; t < 50; t++) begin
      in_req = 1; #0.1;
      checks++;
      if (out_req !== '1) begin failures++; $display("ERROR: request not copied"); end
      // receivers acknowledge one by one
      for (int k = 0; k < N; k++) begin
        int idx;
        do idx = $urandom_range(0, N-1); while (out_ack[idx]);
        #($urandom_range(1, 3));
        check(in_ack, 0, "ack before all receivers");
        out_ack[idx] = 1; #0.1;
      end
      check(in_ack, 1, "ack after all receivers");
      in_req = 0; #0.1;
      checks++;
      if (out_req !== '0) begin failures++; $display("ERROR: request release not copied"); end
      for (int k = 0; k < N; k++) begin
        int idx;
        do idx = $urandom_range(0, N-1); while (!out_ack[idx]);
        #($urandom_range(1, 3));
        check(in_ack, 1, "ack held until all withdrawn");
        out_ack[idx] = 0; #0.1;
      end
      check(in_ack, 0, "ack released");
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
