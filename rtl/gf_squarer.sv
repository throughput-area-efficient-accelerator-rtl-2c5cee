// gf_squarer: squaring in GF(2^m).
//
// In characteristic 2 the square of a(z) = sum a_i z^i is sum a_i z^(2i): the
// unreduced square is the input with a constant 0 placed after every bit,
// giving a (2m-1)-bit polynomial, which gf_reduce folds back to m bits. Both
// steps are wiring and XORs, so a square costs one clock cycle in the datapath.
module gf_squarer #(
  parameter int unsigned M = 233,
  parameter int unsigned K = 74
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] sq
);
  logic [2*M-2:0] spread;

  always_comb begin
    spread = '0;
    for (int i = 0; i < int'(M); i++) spread[2*i] = a[i];
  end

  gf_reduce #(.M(M), .K(K)) u_red (.c(spread), .r(sq));
endmodule
