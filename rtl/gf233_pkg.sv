// gf233_pkg: constants and types shared by the GF(2^233) point-multiplication
// accelerator.
//
// Field: GF(2^233) in polynomial basis with the NIST trinomial
// f(z) = z^233 + z^74 + 1 (the field of curves B-233 / K-233). The memory is
// 12 words of 233 bits with 4-bit addresses, as in the published design. The word map
// (REG_*) and the control-word layout are choices of this design.
package gf233_pkg;

  localparam int unsigned GF_M  = 233;  // field degree
  localparam int unsigned GF_K  = 74;   // middle term of the reduction trinomial
  localparam int unsigned MEM_DEPTH = 12; // memory words
  localparam int unsigned AW    = 4;    // memory address width

  typedef logic [GF_M-1:0] elem_t;
  typedef logic [AW-1:0] addr_t;

  // Memory word map.
  localparam addr_t REG_XP = 4'd0;   // affine x of the base point
  localparam addr_t REG_YP = 4'd1;   // affine y of the base point
  localparam addr_t REG_CB = 4'd2;   // curve constant b
  localparam addr_t REG_X1 = 4'd3;
  localparam addr_t REG_Z1 = 4'd4;
  localparam addr_t REG_X2 = 4'd5;
  localparam addr_t REG_Z2 = 4'd6;
  localparam addr_t REG_T1 = 4'd7;   // ladder temporary; y of the result at the end
  localparam addr_t REG_T2 = 4'd8;   // x of the result at the end
  localparam addr_t REG_T3 = 4'd9;
  localparam addr_t REG_T4 = 4'd10;
  localparam addr_t REG_T5 = 4'd11;

  // Routing-network selects (Figure 1: c1 feeds port a, c2 feeds port b).
  typedef enum logic {C1_AOUT = 1'b0, C1_EXT = 1'b1} c1_e;
  typedef enum logic {C2_DWBACK = 1'b0, C2_EXT = 1'b1} c2_e;
  // Arithmetic-unit write-back select (c3).
  typedef enum logic [1:0] {C3_MOUT = 2'd0, C3_DOUTA = 2'd1, C3_SOUT = 2'd2} c3_e;

  // One cycle's worth of datapath control, as issued by the control unit.
  typedef struct packed {
    addr_t addra;
    addr_t addrb;
    logic  wea;
    logic  web;
    c1_e   c1;
    c2_e   c2;
    c3_e   c3;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{addra: '0, addrb: '0, wea: 1'b0, web: 1'b0,
                                 c1: C1_AOUT, c2: C2_DWBACK, c3: C3_MOUT};

  // One instruction of the control unit's programs: read words ra (port a)
  // and rb (port b); then optionally write the adder result (or, with a_ext,
  // the constant one) to wa through port a, and the c3-selected result to wb
  // through port b.
  typedef struct packed {
    addr_t ra;
    addr_t rb;
    logic  wa_en;
    logic  a_ext;
    addr_t wa;
    logic  wb_en;
    addr_t wb;
    c3_e   c3;
  } instr_t;

endpackage
