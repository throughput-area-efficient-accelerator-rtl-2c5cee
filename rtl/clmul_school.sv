// clmul_school: schoolbook carry-less (GF(2)[z]) polynomial multiplier.
//
// Bit-parallel AND/XOR array: p = sum over i of (a_i * b) shifted by i.
// It is the leaf of the Karatsuba recursion (kara_mul), where the operands are
// 29 or 30 bits wide at the default size. Combinational.
module clmul_school #(
  parameter int unsigned N = 29
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] p
);
  always_comb begin
    p = '0;
    for (int i = 0; i < int'(N); i++)
      if (a[i]) p[i +: N] = p[i +: N] ^ b;
  end
endmodule
