`timescale 1ns/1ps
// Self-checking testbench of the handshake multiplexer (three inputs,
// one-hot select). Every input keeps a request pending; for each handshake a
// random input is selected, and the testbench checks that only its request
// reaches the output, that only it is acknowledged, that its acknowledge is
// held until the output acknowledge returns to zero, and that the other
// inputs stay stalled.
module async_mux_tb;

  localparam int unsigned N = 3;

  logic         rst, out_req, out_ack;
  logic [N-1:0] sel, in_req, in_ack;
  int checks = 0, failures = 0;

  async_mux #(.N(N)) dut (.rst(rst), .sel(sel), .in_req(in_req), .in_ack(in_ack),
                          .out_req(out_req), .out_ack(out_ack));

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("ERROR: %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; sel = '0; in_req = '0; out_ack = 0;
    #1 rst = 0;
    in_req = '1; #1;
    check(out_req, 0, "nothing selected");
    for (int t = 0; t < 60; t++) begin
      int k;
      k = $urandom_range(0, N-1);
      sel = N'(1) << k; #0.5;
      check(out_req, 1, "selected request passes");
      out_ack = 1; #0.5;
      checks++;
      if (in_ack !== (N'(1) << k)) begin
        failures++;
        $display("ERROR: in_ack=%b for select %0d", in_ack, k);
      end
      in_req[k] = 0; #0.5;
      check(out_req, 0, "request withdrawn");
      check(in_ack[k], 1, "ack held while out_ack high");
      out_ack = 0; #0.5;
      check(in_ack[k], 0, "ack released");
      sel = '0; #0.5;
      in_req[k] = 1; #0.5;            // the sender queues its next request
      check(out_req, 0, "unselected requests stall");
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
