// kara_mul: bit-parallel recursive Karatsuba polynomial multiplier over GF(2).
//
// An N-bit operand is split into a low part of LO = ceil(N/2) bits (al, bl)
// and a high part of HI = N - LO bits (ah, bh). Three half-size products are
// formed: Mult1 = ah*bh, Mult2 = al*bl and Mult3 = (ah+al)*(bh+bl) (Add1,
// Add2). Add3 gives the middle term Mult3 + Mult1 + Mult2; it is shifted by LO
// (Shift1, about m/2) and Mult1 by 2*LO (Shift2, about m), and Add4 XORs the
// three into the 2N-1 bit product. Each half-size product is again a kara_mul
// with LEVELS-1, so the default three levels split 233 into 117/116, then
// 59/58 and 58/58, then 30/29 and 29/29, as the published split tree shows;
// below the last split a schoolbook array (clmul_school) multiplies.
// The rounding of odd sizes (low part takes the extra bit) is this design's
// choice. Fully combinational: one product per clock cycle.
//
// Lint note: Verilator's lint keeps one unelaborated copy of a module that
// instantiates itself and reports p_lo, p_mid and p_hi of that copy as
// undriven (and asum, bsum as unused). The elaborated instances are fully
// connected; simulation of the full tree matches a bit-by-bit reference.
module kara_mul #(
  parameter int unsigned N      = 233,
  parameter int unsigned LEVELS = 3
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] p
);
  if (LEVELS == 0 || N < 4) begin : g_leaf
    clmul_school #(.N(N)) u_school (.a(a), .b(b), .p(p));
  end else begin : g_split
    localparam int unsigned LO = (N + 1) / 2;
    localparam int unsigned HI = N - LO;

    logic [LO-1:0]   al, bl, asum, bsum;
    logic [HI-1:0]   ah, bh;
    logic [2*LO-2:0] p_lo, p_mid;
    logic [2*HI-2:0] p_hi;
    logic [2*LO-2:0] mid;

    assign al = a[LO-1:0];
    assign bl = b[LO-1:0];
    assign ah = a[N-1:LO];
    assign bh = b[N-1:LO];

    // Add1 / Add2
    assign asum = al ^ LO'(ah);
    assign bsum = bl ^ LO'(bh);

    kara_mul #(.N(HI), .LEVELS(LEVELS-1)) u_mult1 (.a(ah),   .b(bh),   .p(p_hi));
    kara_mul #(.N(LO), .LEVELS(LEVELS-1)) u_mult2 (.a(al),   .b(bl),   .p(p_lo));
    kara_mul #(.N(LO), .LEVELS(LEVELS-1)) u_mult3 (.a(asum), .b(bsum), .p(p_mid));

    // Add3: middle term
    assign mid = p_mid ^ p_lo ^ (2*LO-1)'(p_hi);

    // Shift1, Shift2, Add4
    assign p = (2*N-1)'(p_lo)
             ^ ((2*N-1)'(mid)  << LO)
             ^ ((2*N-1)'(p_hi) << (2*LO));
  end
endmodule
