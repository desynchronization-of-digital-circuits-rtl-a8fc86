`timescale 1ns/1ps
// Combinational adder of the accumulator example: sum = a + b, modulo
// 2^WIDTH (the carry out is dropped, as in the 8-bit original). It is the
// only logic between the accumulator's registers and the path that the
// accumulator's matched delay stands for.
module accu_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);

  assign sum = a + b;

endmodule
