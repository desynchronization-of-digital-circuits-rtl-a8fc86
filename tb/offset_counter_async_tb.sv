`timescale 1ns/1ps
// Self-checking testbench of the desynchronized offset counter.
//
// The testbench drives the control channel (clr, pause with in_req) and
// consumes the count channel, one count step per handshake pair, and
// follows a reference count. It checks the reset token 0/0, counting over
// several column wraps (more than 270 steps), pause, clear, that the output
// request never comes sooner than the matched delay after the previous
// step, and a run with a slow consumer that stalls the loop. A watchdog
// ends a deadlocked run.
module offset_counter_async_tb;
  import edge_pkg::*;

  logic                rst, clr, pause, in_req, in_ack, out_req, out_ack;
  logic [OFFSET_W-1:0] lo;
  logic [MEMCOL_W-1:0] hi;
  int checks = 0, failures = 0;
  int el = 0, eh = 0;
  realtime t_step;

  offset_counter_async dut (
    .rst(rst), .clr(clr), .pause(pause), .in_req(in_req), .in_ack(in_ack),
    .out_req(out_req), .out_ack(out_ack), .count_low(lo), .count_high(hi)
  );

  task automatic expect_count(string what);
    checks++;
    if (lo != el || hi != eh) begin
      failures++;
      $display("ERROR: %s: count %0d/%0d expected %0d/%0d", what, hi, lo, eh, el);
    end
  endtask

  // One step: count present; apply controls, handshake both channels.
  task automatic step(input logic c, input logic p, input int slow);
    wait (!in_ack);
    clr = c; pause = p;
    #0.5 in_req = 1;
    if (slow > 0) #(slow);
    out_ack = 1;
    wait (in_ack);
    #0.3 in_req = 0;
    wait (!out_req);
    #0.3 out_ack = 0;
    wait (out_req);
    checks++;
    if ($realtime - t_step < 2.0) begin
      failures++;
      $display("ERROR: next count %0.2f ns after the previous one, faster than the matched delay",
               $realtime - t_step);
    end
    t_step = $realtime;
    #0.2;
    if (c)                      begin el = 0; eh = 0; end
    else if (p)                 begin end
    else if (el == OFFSET_LAST) begin el = 0; eh = (eh == MEMCOL_LAST) ? 0 : eh + 1; end
    else                        el++;
  endtask

  initial begin
    #200000 $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst = 1; clr = 0; pause = 0; in_req = 0; out_ack = 0;
    #5 rst = 0;
    // the reset token is on the loop from the start of reset
    t_step = 0;
    wait (out_req);
    #0.2 expect_count("reset token");
    for (int i = 0; i < 300; i++) begin step(0, 0, 0); expect_count("count"); end
    for (int i = 0; i < 5; i++)   begin step(0, 1, 0); expect_count("pause"); end
    step(1, 0, 0); expect_count("clear");
    step(1, 1, 0); expect_count("clear over pause");
    for (int i = 0; i < 20; i++)  begin step(0, 1'($urandom_range(0, 3) == 0), (i % 4 == 0) ? 30 : 0);
                                        expect_count("random pause, slow consumer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
