`timescale 1ns/1ps
// Self-checking testbench of offset_counter_next: exhaustive over all
// count values and control combinations, against a reference model of the
// two-level counter (low part 0..2, column part 0..89, clear before pause).
module offset_counter_next_tb;
  import edge_pkg::*;

  logic                clr, pause;
  logic [OFFSET_W-1:0] li, lo;
  logic [MEMCOL_W-1:0] hi, ho;
  int checks = 0, failures = 0;

  offset_counter_next dut (.clr(clr), .pause(pause), .low_in(li), .high_in(hi),
                           .low_out(lo), .high_out(ho));

  initial begin
    #100000 $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int el, eh;
    for (int c = 0; c < 4; c++)
      for (int h = 0; h <= MEMCOL_LAST; h++)
        for (int l = 0; l <= OFFSET_LAST; l++) begin
          {clr, pause} = 2'(c); li = OFFSET_W'(l); hi = MEMCOL_W'(h); #1;
          if (clr)                   begin el = 0; eh = 0; end
          else if (pause)            begin el = l; eh = h; end
          else if (l == OFFSET_LAST) begin el = 0; eh = (h == MEMCOL_LAST) ? 0 : h + 1; end
          else                       begin el = l + 1; eh = h; end
          checks++;
          if (lo != el || ho != eh) begin
            failures++;
            $display("ERROR: clr %0d pause %0d %0d/%0d -> %0d/%0d, expected %0d/%0d",
                     clr, pause, h, l, ho, lo, eh, el);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
