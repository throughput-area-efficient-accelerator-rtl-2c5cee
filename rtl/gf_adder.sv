// gf_adder: addition in GF(2^m).
//
// Addition of two polynomial-basis field elements is a bitwise exclusive-OR,
// one XOR gate per bit, with no carries and no reduction as in the published design.
// Purely combinational; the surrounding datapath gives it one clock cycle.
module gf_adder #(
  parameter int unsigned M = 233
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] sum
);
  assign sum = a ^ b;
endmodule
