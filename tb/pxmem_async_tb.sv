`timescale 1ns/1ps
// Self-checking testbench of the desynchronized PxMem.
//
// Writes random words to random registers (one group code non-zero at a
// time) following the write sequence of the block: present the code and
// word, raise the write request until it is acknowledged, then acknowledge the old token on the
// output channel and wait for the new one. After every write all nine
// registers are compared with a reference array, so a write that disturbs
// another register is caught. It also checks the all-zero reset contents,
// that the new token is shown no sooner than the matched delay after the
// old one is released, and that all nine registers were written. A watchdog
// ends a deadlocked run.
module pxmem_async_tb;

  localparam int unsigned W = 32;

  logic                rst, in_req, in_ack, out_req, out_ack;
  logic [2:0][1:0]     code;
  logic [W-1:0]        word;
  logic [8:0][W-1:0]   px;
  logic [W-1:0]        model [9];
  int checks = 0, failures = 0;
  bit [8:0] written = '0;

  pxmem_async dut (.rst(rst), .code(code), .word(word), .in_req(in_req), .in_ack(in_ack),
                   .out_req(out_req), .out_ack(out_ack), .px(px));

  task automatic compare(string what);
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (px[i] !== model[i]) begin
        failures++;
        $display("ERROR: %s: register %0d = %h expected %h", what, i, px[i], model[i]);
      end
    end
  endtask

  task automatic write(int g, int r, logic [W-1:0] w);
    realtime t0;
    code = '0;
    code[g] = 2'(r + 1);
    word = w;
    wait (out_req);            // the selected register's present token
    #0.3 in_req = 1;
    wait (in_ack);
    #0.3 in_req = 0;
    #0.3 out_ack = 1;          // release the old word
    wait (!out_req);
    #0.3 out_ack = 0;
    t0 = $realtime;
    wait (out_req);            // new word valid
    wait (!in_ack);
    checks++;
    if ($realtime - t0 < 2.0) begin
      failures++;
      $display("ERROR: new token after %0.2f ns, less than the matched delay", $realtime - t0);
    end
    model[3*g + r] = w;
    written[3*g + r] = 1'b1;
    #0.5 word = ~w;            // the bus moves on; stored words must not
    #0.5 compare("after write");
  endtask

  initial begin
    #400000 $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst = 1; in_req = 0; out_ack = 0; code = '0; word = '0;
    for (int i = 0; i < 9; i++) model[i] = '0;
    #5 rst = 0;
    #5 compare("reset");
    for (int i = 0; i < 9; i++) write(i / 3, i % 3, $urandom);
    for (int n = 0; n < 60; n++) write($urandom_range(0, 2), $urandom_range(0, 2), $urandom);
    checks++;
    if (written != '1) begin failures++; $display("ERROR: not all registers written"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
