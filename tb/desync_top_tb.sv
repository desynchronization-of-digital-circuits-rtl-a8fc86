`timescale 1ns/1ps
// End-to-end testbench of the top level, at its default parameters.
//
// The accumulator and the GCD run at the same time, each with its own
// four-phase environment. The accumulator's output stream is compared with
// running sums computed here; the GCD's results with Euclid's algorithm.
// The testbench also counts how often each handshake mechanism of the
// design was exercised and fails if one never was:
//   - the initial token of a register (first accumulator output is 0),
//   - a join waiting for one of its inputs,
//   - a fork waiting for the slower of its receivers,
//   - a matched delay holding a request back,
//   - back-pressure stalling a producer (consumer slow, pipeline full),
//   - the GCD steps: operand exchange, A - B, B - A and the equality exit,
//   - the edge detector: offset counter low and column wraps, pause and
//     clear, flipped and unflipped memory words, PxMem writes into all
//     nine registers, Sobel pixels saved at all four addresses, and words
//     passed to the bus.
// The edge datapath is checked against a model of the nine registers, the
// Sobel operator on their low bytes, and the four saved pixels.
module desync_top_tb;
  import gcd_pkg::*;
  import edge_pkg::*;

  localparam int unsigned NACC  = 120;
  localparam int unsigned NGCD  = 12;

  logic       accu_rst, accu_in_req, accu_in_ack, accu_out_req, accu_out_ack;
  logic [7:0] accu_din, accu_dout;
  logic       gcd_rst, gcd_input_valid, gcd_in_req, gcd_in_ack, gcd_out_req, gcd_out_ack;
  logic       gcd_output_valid;
  logic [7:0] gcd_data_in, gcd_data_out;

  int checks = 0, failures = 0;
  int n_token = 0, n_join_wait = 0, n_fork_wait = 0, n_delay_hold = 0, n_stall = 0;
  int n_sub_a = 0, n_sub_b = 0, n_equal = 0, n_operands = 0;
  bit accu_done = 0, gcd_done = 0, cnt_done = 0, dp_done = 0;

  logic                edge_rst, edge_cnt_clr, edge_cnt_pause, edge_cnt_in_req, edge_cnt_in_ack;
  logic                edge_cnt_out_req, edge_cnt_out_ack;
  logic [OFFSET_W-1:0] edge_cnt_low;
  logic [MEMCOL_W-1:0] edge_cnt_high;
  logic [WORD_W-1:0]   edge_mem_word, edge_bus_word;
  logic                edge_mem_flip, edge_pxm_req, edge_pxm_ack, edge_pxm_out_req, edge_pxm_out_ack;
  logic [2:0][1:0]     edge_pxm_code;
  logic [PIXEL_W-1:0]  edge_pixel;
  logic [1:0]          edge_sav_addr;
  logic                edge_sav_req, edge_sav_ack, edge_sav_out_req, edge_sav_out_ack;
  logic [3:0][PIXEL_W-1:0] edge_sav_pixels;
  logic                edge_word_req, edge_word_ack, edge_bus_req, edge_bus_ack;
  int n_low_wrap = 0, n_col_wrap = 0, n_pause = 0, n_clear = 0, n_flip = 0, n_noflip = 0;
  int n_bus_word = 0;
  bit [8:0] pxm_written = '0;
  bit [3:0] sav_written = '0;

  desync_top dut (.*);

  task automatic fail(string msg);
    failures++;
    $display("ERROR: %s", msg);
  endtask

  // ---------------- mechanism monitors ----------------
  // join: one input requesting, the merged request still low
  always @(dut.u_accu.u_join.in_req)
    if (^dut.u_accu.u_join.in_req && !dut.u_accu.u_join.out_req) n_join_wait++;
  // fork: request out, one receiver acknowledged and the other not yet
  always @(dut.u_accu.u_fork.out_ack)
    if (dut.u_accu.u_fork.in_req && ^dut.u_accu.u_fork.out_ack) n_fork_wait++;
  // matched delay: request in, delayed request not yet out
  always @(posedge dut.u_gcd.u_delay.din) begin
    #0.01;
    if (dut.u_gcd.u_delay.din && !dut.u_gcd.u_delay.dout) n_delay_hold++;
  end
  // GCD steps, taken when the state register's slave closes
  always @(posedge dut.u_gcd.lt_s) begin
    case (gcd_state_e'(dut.u_gcd.state))
      WRITE_A:         n_sub_a++;
      A_GREATER_CHECK: if (dut.u_gcd.reg_a <= dut.u_gcd.reg_b) n_sub_b++;
      RESET_ACK:       ;
      default:         ;
    endcase
  end
  always @(posedge gcd_output_valid)
    if (gcd_state_e'(dut.u_gcd.state) == RESET_ACK) n_equal++;

  // ---------------- accumulator ----------------
  logic [7:0] acc_exp [$];
  realtime    t_req;
  initial begin
    logic [7:0] acc;
    accu_rst = 1; accu_in_req = 0; accu_din = 0; acc = 0;
    acc_exp.push_back(8'd0);
    #5 accu_rst = 0;
    #3;
    for (int i = 0; i < NACC; i++) begin
      accu_din = 8'($urandom);
      acc = acc + accu_din;
      acc_exp.push_back(acc);
      #1 accu_in_req = 1;
      t_req = $realtime;
      wait (accu_in_ack);
      #0.5 accu_in_req = 0;
      wait (!accu_in_ack);
      if ($realtime - t_req > 20.0) n_stall++;
      #($urandom_range(0, 3));
    end
  end
  initial begin
    int n;
    accu_out_ack = 0; n = 0;
    wait (!accu_rst);
    forever begin
      wait (accu_out_req);
      checks++;
      if (acc_exp.size() == 0) fail("accumulator output without input");
      else begin
        logic [7:0] e;
        e = acc_exp.pop_front();
        if (accu_dout !== e) fail($sformatf("accumulator output %0d = %0d, expected %0d", n, accu_dout, e));
        if (n == 0 && accu_dout == 8'd0) n_token++;
      end
      n++;
      if (n == NACC + 1) begin accu_done = 1; break; end
      if (n % 13 == 0) #40; else #($urandom_range(1, 6));
      accu_out_ack = 1;
      wait (!accu_out_req);
      #($urandom_range(1, 2)) accu_out_ack = 0;
    end
  end

  // ---------------- GCD ----------------
  function automatic int unsigned euclid(int unsigned a, int unsigned b);
    while (b != 0) begin
      int unsigned t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  task automatic gstep(input logic iv, input logic [7:0] d, output logic ov, output logic [7:0] res);
    wait (!gcd_in_ack);
    gcd_input_valid = iv;
    gcd_data_in     = d;
    #1;
    gcd_in_req  = 1;
    gcd_out_ack = 1;
    wait (gcd_in_ack);
    #0.5 gcd_in_req = 0;
    wait (!gcd_out_req);
    #0.5 gcd_out_ack = 0;
    wait (gcd_out_req);
    #0.2;
    ov  = gcd_output_valid;
    res = gcd_data_out;
  endtask

  initial begin
    logic ov;
    logic [7:0] res, a, b;
    int g;
    gcd_rst = 1; gcd_in_req = 0; gcd_out_ack = 0; gcd_input_valid = 0; gcd_data_in = 0;
    #7 gcd_rst = 0;
    wait (gcd_out_req);
    for (int p = 0; p < NGCD; p++) begin
      if (p == 0) begin a = 56; b = 12; end
      else if (p == 1) begin a = 156; b = 30; end
      else begin a = 8'($urandom_range(1, 255)); b = 8'($urandom_range(1, 255)); end
      g = 0;
      do begin gstep(1, a, ov, res); g++; end while (!ov && g < 10);
      do begin gstep(0, a, ov, res); g++; end while (ov && g < 20);
      n_operands++;
      g = 0;
      do begin gstep(1, b, ov, res); g++; end while (!ov && g < 2000);
      checks++;
      if (res !== 8'(euclid(a, b))) fail($sformatf("GCD(%0d,%0d) = %0d, expected %0d", a, b, res, euclid(a, b)));
      g = 0;
      do begin gstep(0, b, ov, res); g++; end while (ov && g < 10);
    end
    gcd_done = 1;
  end


  // ---------------- edge detector: offset counter ----------------
  initial begin
    int el, eh;
    logic c, p;
    edge_cnt_clr = 0; edge_cnt_pause = 0; edge_cnt_in_req = 0; edge_cnt_out_ack = 0;
    el = 0; eh = 0;
    wait (!edge_rst);
    wait (edge_cnt_out_req);
    for (int i = 0; i < 300; i++) begin
      c = (i == 280);
      p = (i % 37 == 5);
      #0.2;
      checks++;
      if (edge_cnt_low != el || edge_cnt_high != eh)
        fail($sformatf("offset count %0d/%0d, expected %0d/%0d", edge_cnt_high, edge_cnt_low, eh, el));
      wait (!edge_cnt_in_ack);
      edge_cnt_clr = c; edge_cnt_pause = p;
      #0.5 edge_cnt_in_req = 1;
      edge_cnt_out_ack = 1;
      wait (edge_cnt_in_ack);
      #0.3 edge_cnt_in_req = 0;
      wait (!edge_cnt_out_req);
      #0.3 edge_cnt_out_ack = 0;
      wait (edge_cnt_out_req);
      if (c) begin el = 0; eh = 0; n_clear++; end
      else if (p) n_pause++;
      else if (el == OFFSET_LAST) begin
        el = 0; n_low_wrap++;
        if (eh == MEMCOL_LAST) begin eh = 0; n_col_wrap++; end else eh++;
      end else el++;
    end
    cnt_done = 1;
  end

  // ---------------- edge detector: datapath ----------------
  logic [WORD_W-1:0]  pxm_model [9];
  logic [3:0][PIXEL_W-1:0] sav_model;

  function automatic logic [PIXEL_W-1:0] sobel_ref();
    int w [9];
    int gx, gy, m;
    for (int i = 0; i < 9; i++) w[i] = int'(pxm_model[i][PIXEL_W-1:0]);
    gx = (w[2] + 2*w[5] + w[8]) - (w[0] + 2*w[3] + w[6]);
    gy = (w[6] + 2*w[7] + w[8]) - (w[0] + 2*w[1] + w[2]);
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return PIXEL_W'(m > 255 ? 255 : m);
  endfunction

  function automatic logic [WORD_W-1:0] flip_ref(logic [WORD_W-1:0] w);
    return {w[7:0], w[15:8], w[23:16], w[31:24]};
  endfunction

  task automatic pxm_write(int r, logic [WORD_W-1:0] w, logic f);
    edge_pxm_code = '0;
    edge_pxm_code[r / 3] = 2'(r % 3 + 1);
    edge_mem_word = w; edge_mem_flip = f;
    wait (edge_pxm_out_req);
    #0.3 edge_pxm_req = 1;
    wait (edge_pxm_ack);
    #0.3 edge_pxm_req = 0;
    #0.3 edge_pxm_out_ack = 1;
    wait (!edge_pxm_out_req);
    #0.3 edge_pxm_out_ack = 0;
    wait (edge_pxm_out_req);
    wait (!edge_pxm_ack);
    pxm_model[r] = f ? flip_ref(w) : w;
    pxm_written[r] = 1'b1;
    if (f) n_flip++; else n_noflip++;
    #0.5 edge_mem_word = ~w;
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (dut.px[i] !== pxm_model[i])
        fail($sformatf("PxMem register %0d = %h, expected %h", i, dut.px[i], pxm_model[i]));
    end
  endtask

  task automatic save_pixel(int a);
    logic [PIXEL_W-1:0] e;
    e = sobel_ref();
    checks++;
    if (edge_pixel !== e) fail($sformatf("Sobel pixel %0d, expected %0d", edge_pixel, e));
    edge_sav_addr = 2'(a);
    wait (edge_sav_out_req);
    #0.3 edge_sav_req = 1;
    wait (edge_sav_ack);
    #0.3 edge_sav_req = 0;
    #0.3 edge_sav_out_ack = 1;
    wait (!edge_sav_out_req);
    #0.3 edge_sav_out_ack = 0;
    wait (edge_sav_out_req);
    wait (!edge_sav_ack);
    sav_model[a] = e;
    sav_written[a] = 1'b1;
    #0.5 checks++;
    if (edge_sav_pixels !== sav_model) fail($sformatf("saved pixels %h, expected %h", edge_sav_pixels, sav_model));
  endtask

  task automatic word_to_bus();
    #0.3 edge_word_req = 1;
    wait (edge_word_ack);
    #0.3 edge_word_req = 0;
    wait (edge_bus_req);
    #0.2 checks++;
    if (edge_bus_word !== WORD_W'(sav_model)) fail($sformatf("bus word %h, expected %h", edge_bus_word, sav_model));
    n_bus_word++;
    edge_bus_ack = 1;
    wait (!edge_bus_req);
    #0.3 edge_bus_ack = 0;
    wait (!edge_word_ack);
  endtask

  initial begin
    edge_rst = 1; edge_mem_word = '0; edge_mem_flip = 0; edge_pxm_code = '0; edge_pxm_req = 0;
    edge_pxm_out_ack = 0; edge_sav_addr = 0; edge_sav_req = 0; edge_sav_out_ack = 0;
    edge_word_req = 0; edge_bus_ack = 0;
    for (int i = 0; i < 9; i++) pxm_model[i] = '0;
    sav_model = '0;
    #6 edge_rst = 0;
    #2;
    for (int i = 0; i < 9; i++) pxm_write(i, $urandom, 1'(i % 2));
    for (int n = 0; n < 24; n++) begin
      pxm_write($urandom_range(0, 8), {$urandom_range(0, 255), 8'($urandom_range(90, 110))}, 1'($urandom));
      save_pixel(n % 4);
      if (n % 4 == 3) word_to_bus();
    end
    dp_done = 1;
  end

  // ---------------- end ----------------
  initial begin
    wait (accu_done && gcd_done && cnt_done && dp_done);
    #10;
    checks++; if (acc_exp.size() != 0) fail("accumulator outputs missing");
    checks++; if (n_token      == 0) fail("initial token never seen");
    checks++; if (n_join_wait  == 0) fail("join never waited");
    checks++; if (n_fork_wait  == 0) fail("fork never waited");
    checks++; if (n_delay_hold == 0) fail("matched delay never held a request");
    checks++; if (n_stall      == 0) fail("no back-pressure stall");
    checks++; if (n_sub_a      == 0) fail("GCD never subtracted into A");
    checks++; if (n_sub_b      == 0) fail("GCD never subtracted into B");
    checks++; if (n_equal      == 0) fail("GCD never finished on equality");
    checks++; if (n_operands   == 0) fail("GCD never exchanged operands");
    checks++; if (n_low_wrap   == 0) fail("offset counter low part never wrapped");
    checks++; if (n_col_wrap   == 0) fail("offset counter column never wrapped");
    checks++; if (n_pause      == 0) fail("offset counter never paused");
    checks++; if (n_clear      == 0) fail("offset counter never cleared");
    checks++; if (n_flip == 0 || n_noflip == 0) fail("memory words not both flipped and unflipped");
    checks++; if (pxm_written  != '1) fail("not all PxMem registers written");
    checks++; if (sav_written  != '1) fail("not all savePxl addresses written");
    checks++; if (n_bus_word   == 0) fail("no word passed to the bus");
    $display("low_wrap=%0d col_wrap=%0d pause=%0d clear=%0d flip=%0d noflip=%0d bus_words=%0d",
             n_low_wrap, n_col_wrap, n_pause, n_clear, n_flip, n_noflip, n_bus_word);
    $display("token=%0d join_wait=%0d fork_wait=%0d delay_hold=%0d stall=%0d sub_a=%0d sub_b=%0d equal=%0d operands=%0d",
             n_token, n_join_wait, n_fork_wait, n_delay_hold, n_stall, n_sub_a, n_sub_b, n_equal, n_operands);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
