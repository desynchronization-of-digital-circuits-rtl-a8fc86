`timescale 1ns/1ps
// Self-checking testbench of bit_flipper: random words with flip 0 and 1,
// each output pixel compared with the expected pixel position.
module bit_flipper_tb;
  import edge_pkg::*;

  logic [WORD_W-1:0] wi, wo;
  logic              flip;
  int checks = 0, failures = 0;

  bit_flipper dut (.word_in(wi), .flip(flip), .word_out(wo));

  initial begin
    #100000 $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    // the thesis' example: ABCD becomes DCBA
    wi = {8'hA, 8'hB, 8'hC, 8'hD}; flip = 1; #1;
    checks++;
    if (wo !== {8'hD, 8'hC, 8'hB, 8'hA}) begin failures++; $display("ERROR: ABCD -> %h", wo); end
    for (int i = 0; i < 400; i++) begin
      wi = $urandom; flip = 1'($urandom); #1;
      for (int p = 0; p < PX_PER_WORD; p++) begin
        int src;
        src = flip ? PX_PER_WORD - 1 - p : p;
        checks++;
        if (wo[p*PIXEL_W +: PIXEL_W] !== wi[src*PIXEL_W +: PIXEL_W]) begin
          failures++;
          $display("ERROR: word %h flip %0d pixel %0d = %h", wi, flip, p, wo[p*PIXEL_W +: PIXEL_W]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
