`timescale 1ns/1ps
// Self-checking testbench of the desynchronized savePxl output register.
//
// Saves random pixels at random addresses with the block's pixel write
// sequence (request, release of the old pixel on the output channel, new
// token) and compares all four pixel registers with a reference after each
// write, then passes the collected word to the bus through pxl2bus and
// checks the word (address 0 in the low byte). Also checks the zero reset
// contents, that the new pixel token comes no sooner than the matched
// delay, and that the bus side stays empty until a word is requested. A
// watchdog ends a deadlocked run.
module savepxl_async_tb;
  import edge_pkg::*;

  logic                  rst, px_req, px_ack, px_out_req, px_out_ack;
  logic                  word_req, word_ack, bus_req, bus_ack;
  logic [1:0]            addr;
  logic [PIXEL_W-1:0]    pixel;
  logic [3:0][PIXEL_W-1:0] pixels, model;
  logic [WORD_W-1:0]     bus_word;
  int checks = 0, failures = 0;

  savepxl_async dut (
    .rst(rst), .addr(addr), .pixel(pixel), .px_req(px_req), .px_ack(px_ack),
    .px_out_req(px_out_req), .px_out_ack(px_out_ack), .pixels(pixels),
    .word_req(word_req), .word_ack(word_ack), .bus_req(bus_req), .bus_ack(bus_ack),
    .bus_word(bus_word)
  );

  task automatic check(logic [WORD_W-1:0] got, logic [WORD_W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("ERROR: %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic save(int a, logic [PIXEL_W-1:0] p);
    realtime t0;
    addr = 2'(a); pixel = p;
    wait (px_out_req);
    #0.3 px_req = 1;
    wait (px_ack);
    #0.3 px_req = 0;
    #0.3 px_out_ack = 1;
    wait (!px_out_req);
    #0.3 px_out_ack = 0;
    t0 = $realtime;
    wait (px_out_req);
    wait (!px_ack);
    checks++;
    if ($realtime - t0 < 2.0) begin
      failures++;
      $display("ERROR: pixel token after %0.2f ns, less than the matched delay", $realtime - t0);
    end
    model[a] = p;
    #0.5 pixel = ~p;
    #0.5 check(pixels, model, "pixel registers");
  endtask

  task automatic to_bus();
    #0.3 word_req = 1;
    wait (word_ack);
    #0.3 word_req = 0;
    wait (bus_req);
    #0.2 check(bus_word, model, "bus word");
    bus_ack = 1;
    wait (!bus_req);
    #0.3 bus_ack = 0;
    wait (!word_ack);
  endtask

  initial begin
    #400000 $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst = 1; px_req = 0; px_out_ack = 0; word_req = 0; bus_ack = 0; addr = 0; pixel = 0;
    model = '0;
    #5 rst = 0;
    #5 check(pixels, '0, "reset pixels");
    check(32'(bus_req), 0, "no bus word before a request");
    for (int w = 0; w < 15; w++) begin
      for (int a = 0; a < 4; a++) save(a, $urandom);
      repeat (3) save($urandom_range(0, 3), $urandom);
      to_bus();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
