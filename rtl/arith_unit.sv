// arith_unit: the single arithmetic unit of the accelerator.
//
// One adder, one Karatsuba modular multiplier and one squarer all see the two
// memory outputs at once: the adder and the multiplier take douta and doutb,
// the squarer takes douta. The adder result leaves on aout (to port a's
// routing multiplexer). A 3:1 multiplexer (c3) picks the word for port b:
// the product (mout), douta unchanged (a copy), or the square (sout). The
// inversion reuses the multiplier and squarer; there is no separate inverter.
// Combinational: every operation completes in the cycle after its operands
// were read.
module arith_unit
  import gf233_pkg::*;
#(
  parameter int unsigned M = 233,
  parameter int unsigned K = 74
) (
  input  logic [M-1:0] douta,
  input  logic [M-1:0] doutb,
  input  c3_e          c3,
  output logic [M-1:0] aout,
  output logic [M-1:0] dwback
);
  logic [M-1:0] mout, sout;

  gf_adder   #(.M(M))        u_add (.a(douta), .b(doutb), .sum(aout));
  gf_mult    #(.M(M), .K(K)) u_mul (.a(douta), .b(doutb), .p(mout));
  gf_squarer #(.M(M), .K(K)) u_sqr (.a(douta), .sq(sout));

  always_comb begin
    unique case (c3)
      C3_MOUT:  dwback = mout;
      C3_DOUTA: dwback = douta;
      C3_SOUT:  dwback = sout;
      default:  dwback = mout;
    endcase
  end
endmodule
