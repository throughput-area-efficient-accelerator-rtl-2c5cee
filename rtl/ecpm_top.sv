// ecpm_top: elliptic-curve point multiplier Q = d*P over GF(2^233).
//
// The datapath is one dual-port memory (dp_ram, 12 x 233), one arithmetic
// unit (arith_unit: adder, Karatsuba multiplier, squarer and write-back
// multiplexer) and a routing network of two 2:1 multiplexers (routing_net)
// in front of the memory's write ports; the FSM control unit (ecpm_ctrl)
// drives addresses, write enables and selects, and sequences the
// Itoh-Tsujii inversions on the same multiplier and squarer.
//
// Use: present xp, yp (the affine base point), con_b (curve constant b of
// y^2 + xy = x^3 + a*x^2 + b) and key, and pulse din_ext for one cycle in
// the idle state; keep xp, yp and con_b stable for the two cycles after it.
// Then pulse start. After 7223 cycles (counted from the cycle start is
// sampled) done is high for two cycles: doutf carries x of d*P in the first,
// y in the second. The key must have bit 231 set and bit 232 clear; the
// curve constant a is not needed. rst is synchronous and active high.
module ecpm_top
  import gf233_pkg::*;
#(
  parameter int unsigned M     = 233,
  parameter int unsigned K     = 74,
  parameter int unsigned DEPTH = 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         din_ext,
  input  logic [M-1:0] key,
  input  logic [M-1:0] xp,
  input  logic [M-1:0] yp,
  input  logic [M-1:0] con_b,
  output logic         done,
  output logic [M-1:0] doutf
);
  ctrl_t        ctl;
  logic [M-1:0] ext_a, ext_b;
  logic [M-1:0] dina, dinb, douta, doutb;
  logic [M-1:0] aout, dwback;
  logic         busy;

  ecpm_ctrl #(.M(M)) u_ctrl (
    .clk, .rst, .start, .din_ext, .key, .xp, .yp, .con_b,
    .ctl, .ext_a, .ext_b, .done, .busy
  );

  routing_net #(.M(M)) u_route (
    .c1(ctl.c1), .c2(ctl.c2), .ext_a, .ext_b, .aout, .dwback, .dina, .dinb
  );

  dp_ram #(.W(M), .DEPTH(DEPTH), .AW(AW)) u_mem (
    .clk,
    .addra(ctl.addra), .wea(ctl.wea), .dina, .douta,
    .addrb(ctl.addrb), .web(ctl.web), .dinb, .doutb
  );

  arith_unit #(.M(M), .K(K)) u_au (
    .douta, .doutb, .c3(ctl.c3), .aout, .dwback
  );

  assign doutf = done ? douta : '0;

  always_ff @(posedge clk) begin
    if (!rst && busy) assert (!din_ext) else $error("ecpm_top: din_ext while busy");
  end
endmodule
