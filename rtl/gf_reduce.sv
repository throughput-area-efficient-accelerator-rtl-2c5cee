// gf_reduce: reduction of a polynomial of degree <= 2m-2 modulo the trinomial
// f(z) = z^M + z^K + 1 (default z^233 + z^74 + 1).
//
// Uses z^M = z^K + 1: each set coefficient c_i with i >= M is cleared and
// folded into c_(i-M) and c_(i-M+K). Folding from the top coefficient down
// lets a fold that lands at or above M be folded again, so the loop is the
// bit-level form of the word-wise shift-and-XOR fast reduction the published design
// uses. Combinational; the result is an M-bit field element.
module gf_reduce #(
  parameter int unsigned M = 233,
  parameter int unsigned K = 74
) (
  input  logic [2*M-2:0] c,
  output logic [M-1:0]   r
);
  logic [2*M-2:0] t;

  always_comb begin
    t = c;
    for (int i = 2*M-2; i >= int'(M); i--) begin
      if (t[i]) begin
        t[i]       = 1'b0;
        t[i-M]     = ~t[i-M];
        t[i-M+K]   = ~t[i-M+K];
      end
    end
    r = t[M-1:0];
  end
endmodule
