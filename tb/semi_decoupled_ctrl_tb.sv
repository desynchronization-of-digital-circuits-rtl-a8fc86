`timescale 1ns/1ps
// Self-checking testbench of the semi-decoupled latch controller.
//
// Part 1 drives one controller through the handshake sequence of its state
// graph and checks each output event, including the decoupling: a new input
// handshake completes its rising half while the output acknowledge is still
// high. Part 2 builds the thesis' experiment: a six-stage FIFO of these
// controllers with latches, an eager producer and a consumer that never
// acknowledges. It must stall with all six latches holding data (a FIFO of
// simple Muller-pipeline controllers would fill only every other stage), and
// the data must then drain in order.
module semi_decoupled_ctrl_tb;

  localparam int unsigned S = 6;

  logic rst;
  int checks = 0, failures = 0;

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("ERROR: %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  // ---- part 1: single controller ----
  logic ri, ai, ro, ao, lt;
  semi_decoupled_ctrl #(.INIT(1'b0)) dut (
    .rst(rst), .in_req(ri), .in_ack(ai), .out_req(ro), .out_ack(ao), .lt(lt));

  // ---- part 2: six-stage FIFO ----
  logic [S:0]   req, ack;
  logic [S-1:0] ltc;
  logic [7:0]   data [S+1];
  for (genvar i = 0; i < S; i++) begin : g_fifo
    semi_decoupled_ctrl #(.INIT(1'b0)) u_c (
      .rst(rst), .in_req(req[i]), .in_ack(ack[i]),
      .out_req(req[i+1]), .out_ack(ack[i+1]), .lt(ltc[i]));
    dlatch #(.WIDTH(8)) u_l (.rst(rst), .ctrl(ltc[i]), .d(data[i]), .q(data[i+1]));
  end

  initial begin
    int tokens;
    rst = 1; ri = 0; ao = 0; req[0] = 0; ack[S] = 0; data[0] = '0;
    #1 rst = 0;
    #1 check(ai, 0, "idle ai"); check(ro, 0, "idle ro"); check(lt, 0, "idle latch open");
    ri = 1; #1;
    check(lt, 1, "A+ closes latch"); check(ai, 1, "Ai+"); check(ro, 1, "Ro+");
    ri = 0; #1;
    check(ai, 1, "A waits for Ao");
    ao = 1; #1;
    check(ai, 0, "A- after Ao"); check(ro, 0, "Ro-"); check(lt, 0, "latch reopens");
    // decoupling: new input accepted while Ao is still high
    ri = 1; #1;
    check(ai, 1, "A+ while Ao high"); check(ro, 0, "Ro waits for Ao-");
    ao = 0; #1;
    check(ro, 1, "Ro+ after Ao-");
    ri = 0; ao = 1; #1;
    check(ai, 0, "second token passed"); check(ro, 0, "Ro- second");
    ao = 0; #1;

    // FIFO: eager producer, consumer never acknowledges
    tokens = 0;
    for (int k = 0; k < 10; k++) begin
      data[0] = 8'(8'h10 + k);
      #1 req[0] = 1;
      fork
        begin wait (ack[0]); end
        begin #50; end
      join_any
      disable fork;
      if (!ack[0]) break;
      tokens++;
      #1 req[0] = 0;
      // the last token to enter sits in stage 0 until stage 1 frees up
      fork
        begin wait (!ack[0]); end
        begin #50; end
      join_any
      disable fork;
      if (ack[0]) break;
    end
    checks++;
    if (tokens != S) begin
      failures++;
      $display("ERROR: FIFO took %0d tokens, expected %0d", tokens, S);
    end
    check(&ltc, 1, "all six latches hold data");
    // drain: consumer acknowledges each output, data in order
    for (int k = 0; k < S; k++) begin
      wait (req[S]);
      checks++;
      if (data[S] !== 8'(8'h10 + k)) begin
        failures++;
        $display("ERROR: drained %h, expected %h", data[S], 8'(8'h10 + k));
      end
      #1 ack[S] = 1;
      wait (!req[S]);
      #1 ack[S] = 0;
    end
    $display("fifo tokens=%0d", tokens);
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
