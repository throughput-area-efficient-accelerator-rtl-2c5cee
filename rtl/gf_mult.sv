// gf_mult: modular multiplier unit over GF(2^m).
//
// The two m-bit operands (from memory ports a and b) go through the three-level
// Karatsuba multiplier (kara_mul) to a (2m-1)-bit product, which gf_reduce
// folds modulo z^233 + z^74 + 1. The whole unit is combinational, so one field
// multiplication takes one clock cycle in the datapath, as the published design
// intends for its bit-parallel multiplier.
module gf_mult #(
  parameter int unsigned M      = 233,
  parameter int unsigned K      = 74,
  parameter int unsigned LEVELS = 3
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] p
);
  logic [2*M-2:0] full;

  kara_mul  #(.N(M), .LEVELS(LEVELS)) u_kara (.a(a), .b(b), .p(full));
  gf_reduce #(.M(M), .K(K))           u_red  (.c(full), .r(p));
endmodule
