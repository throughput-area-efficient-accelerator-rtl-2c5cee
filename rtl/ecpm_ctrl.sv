// ecpm_ctrl: FSM control unit of the point-multiplication accelerator.
//
// Drives, every cycle, the memory addresses and write enables and the three
// multiplexer selects (c1, c2, c3), following the Montgomery ladder:
//   load     din_ext pulse in IDLE: two cycles write xp (to XP and X1), yp and
//            b into memory and capture the key in a register.
//   IDLE     one cycle: start is seen.
//   APC      affine to projective, 3 instructions, 6 cycles:
//            Z2 = xp^2 and Z1 = 1; X2 = Z2^2; X2 = X2 + b.
//   ladder   for i = M-3 down to 0: one cycle to test key bit i, then the 14
//            instructions of the "if" (bit 1) or "else" (bit 0) branch,
//            2 cycles each: 29 cycles per bit, 231 bits for m = 233.
//   PAC      projective to affine: inversion of Z1, 13 instructions giving
//            x = X1/Z1 and the numerator of y, inversion of x*Z1*Z2, then
//            2 instructions for y. A flag (inv1) tells which inversion has
//            finished, so the two share one inversion state.
//   output   done is high for two cycles; douta carries x, then y.
// An instruction takes a read cycle (addresses of both operands) and an
// execute cycle (the same ports address the destinations, results are
// written); the memory's read is synchronous, hence two cycles. Inversions
// are handed to itoh_tsujii_seq after a one-cycle fetch and run one
// operation per cycle. The "else" branch is the "if" branch with X1/Z1 and
// X2/Z2 exchanged. The key's bit M-2 must be 1 (the ladder starts from
// (P, 2P)); bit M-1 is ignored.
//
// From the published design: the phase structure, the 14-instruction ladder
// branches, the 1 + 6 + 29-per-bit + 242-per-inversion cycle counts and the
// inv1 flag. This design's own: the load sequence, the memory word map, the
// y-recovery instruction list and the two-cycle output.
//
// Latency from the IDLE cycle that sees start to the first done cycle, for
// m = 233: 1 + 6 + 29*231 + (243 + 26 + 243 + 4) + 1 = 7223 cycles. The
// published design reports 7208; its 18-cycle tail after the inversions is shorter
// than the 30 cycles (+2 fetches) of the instruction list used here.
module ecpm_ctrl
  import gf233_pkg::*;
#(
  parameter int unsigned M = 233
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         din_ext,
  input  logic [M-1:0] key,
  input  logic [M-1:0] xp,
  input  logic [M-1:0] yp,
  input  logic [M-1:0] con_b,
  output ctrl_t        ctl,
  output logic [M-1:0] ext_a,
  output logic [M-1:0] ext_b,
  output logic         done,
  output logic         busy
);
  typedef enum logic [3:0] {
    ST_IDLE, ST_LD1, ST_LD2, ST_APC, ST_CHK, ST_LAD, ST_INVF, ST_INV,
    ST_PAC1, ST_PAC2, ST_OUT1, ST_OUT2, ST_OUT3
  } state_e;

  localparam int unsigned IW = $clog2(M);

  state_e        state;
  logic [3:0]    pc;
  logic          ph;        // 0: read cycle, 1: execute cycle
  logic [IW-1:0] iter;      // key bit under test
  logic [M-1:0]  keyreg;
  logic          kbit;      // key bit of the current ladder step
  logic          inv1;      // first inversion finished

  // ---------------------------------------------------------------- programs
  function automatic instr_t mk(addr_t ra, addr_t rb, logic wa_en, logic a_ext,
                                addr_t wa, logic wb_en, addr_t wb, c3_e c3);
    return '{ra: ra, rb: rb, wa_en: wa_en, a_ext: a_ext, wa: wa,
             wb_en: wb_en, wb: wb, c3: c3};
  endfunction

  // b := douta op doutb through port b / a := douta + doutb through port a
  function automatic instr_t opb(addr_t ra, addr_t rb, addr_t wb, c3_e c3);
    return mk(ra, rb, 1'b0, 1'b0, '0, 1'b1, wb, c3);
  endfunction
  function automatic instr_t opa(addr_t ra, addr_t rb, addr_t wa);
    return mk(ra, rb, 1'b1, 1'b0, wa, 1'b0, '0, C3_MOUT);
  endfunction

  function automatic instr_t apc_prog(logic [3:0] n);
    unique case (n)
      4'd0:    return mk(REG_XP, REG_XP, 1'b1, 1'b1, REG_Z1, 1'b1, REG_Z2, C3_SOUT);
      4'd1:    return opb(REG_Z2, REG_Z2, REG_X2, C3_SOUT);
      default: return opa(REG_X2, REG_CB, REG_X2);
    endcase
  endfunction
  localparam logic [3:0] APC_LAST = 4'd2;

  // "if" branch (key bit 1); the "else" branch swaps the two points.
  function automatic addr_t swp(addr_t a, logic bit1);
    if (bit1) return a;
    unique case (a)
      REG_X1:  return REG_X2;
      REG_X2:  return REG_X1;
      REG_Z1:  return REG_Z2;
      REG_Z2:  return REG_Z1;
      default: return a;
    endcase
  endfunction

  function automatic instr_t lad_prog(logic [3:0] n, logic bit1);
    instr_t i;
    unique case (n)
      4'd0:    i = opb(REG_X2, REG_Z1, REG_Z1, C3_MOUT);  // Z1 = X2*Z1
      4'd1:    i = opb(REG_X1, REG_Z2, REG_X1, C3_MOUT);  // X1 = X1*Z2
      4'd2:    i = opa(REG_X1, REG_Z1, REG_T1);           // T1 = X1+Z1
      4'd3:    i = opb(REG_X1, REG_Z1, REG_X1, C3_MOUT);  // X1 = X1*Z1
      4'd4:    i = opb(REG_T1, REG_T1, REG_Z1, C3_SOUT);  // Z1 = T1^2
      4'd5:    i = opb(REG_XP, REG_Z1, REG_T1, C3_MOUT);  // T1 = xp*Z1
      4'd6:    i = opa(REG_X1, REG_T1, REG_X1);           // X1 = X1+T1
      4'd7:    i = opb(REG_Z2, REG_Z2, REG_Z2, C3_SOUT);  // Z2 = Z2^2
      4'd8:    i = opb(REG_Z2, REG_Z2, REG_T1, C3_SOUT);  // T1 = Z2^2
      4'd9:    i = opb(REG_CB, REG_T1, REG_T1, C3_MOUT);  // T1 = b*T1
      4'd10:   i = opb(REG_X2, REG_X2, REG_X2, C3_SOUT);  // X2 = X2^2
      4'd11:   i = opb(REG_X2, REG_Z2, REG_Z2, C3_MOUT);  // Z2 = X2*Z2
      4'd12:   i = opb(REG_X2, REG_X2, REG_X2, C3_SOUT);  // X2 = X2^2
      default: i = opa(REG_X2, REG_T1, REG_X2);           // X2 = X2+T1
    endcase
    i.ra = swp(i.ra, bit1);
    i.rb = swp(i.rb, bit1);
    i.wa = swp(i.wa, bit1);
    i.wb = swp(i.wb, bit1);
    return i;
  endfunction
  localparam logic [3:0] LAD_LAST = 4'd13;

  // After the first inversion (Z1^-1 in T2).
  function automatic instr_t pac1_prog(logic [3:0] n);
    unique case (n)
      4'd0:    return opb(REG_X1, REG_T2, REG_T2, C3_MOUT);  // T2 = xq = X1/Z1
      4'd1:    return opb(REG_Z1, REG_Z2, REG_T3, C3_MOUT);  // T3 = Z1*Z2
      4'd2:    return opb(REG_XP, REG_T3, REG_T4, C3_MOUT);  // T4 = xp*Z1*Z2
      4'd3:    return opb(REG_XP, REG_Z1, REG_Z1, C3_MOUT);  // Z1 = xp*Z1
      4'd4:    return opa(REG_X1, REG_Z1, REG_Z1);           // Z1 = X1 + xp*Z1
      4'd5:    return opb(REG_XP, REG_Z2, REG_Z2, C3_MOUT);  // Z2 = xp*Z2
      4'd6:    return opa(REG_X2, REG_Z2, REG_Z2);           // Z2 = X2 + xp*Z2
      4'd7:    return opb(REG_Z1, REG_Z2, REG_Z1, C3_MOUT);  // Z1 = product of both
      4'd8:    return mk(REG_XP, REG_T2, 1'b1, 1'b0, REG_X1,  // X1 = xp + xq
                         1'b1, REG_Z2, C3_SOUT);              // Z2 = xp^2
      4'd9:    return opa(REG_Z2, REG_YP, REG_Z2);           // Z2 = xp^2 + yp
      4'd10:   return opb(REG_Z2, REG_T3, REG_Z2, C3_MOUT);  // Z2 = (xp^2+yp)*Z1*Z2
      4'd11:   return opa(REG_Z1, REG_Z2, REG_Z1);           // Z1 = numerator
      default: return opb(REG_Z1, REG_X1, REG_Z1, C3_MOUT);  // Z1 = (xp+xq)*numerator
    endcase
  endfunction
  localparam logic [3:0] PAC1_LAST = 4'd12;

  // After the second inversion ((xp*Z1*Z2)^-1 in T5).
  function automatic instr_t pac2_prog(logic [3:0] n);
    unique case (n)
      4'd0:    return opb(REG_Z1, REG_T5, REG_Z1, C3_MOUT);  // Z1 = Z1 * inverse
      default: return opa(REG_Z1, REG_YP, REG_T1);           // T1 = yq = Z1 + yp
    endcase
  endfunction
  localparam logic [3:0] PAC2_LAST = 4'd1;

  // ---------------------------------------------------------------- inversion
  ctrl_t it_ctl;
  logic  it_go, it_busy, it_last;

  assign it_go = (state == ST_INVF);

  itoh_tsujii_seq #(.M(M)) u_inv (
    .clk  (clk),
    .rst  (rst),
    .go   (it_go),
    .src  (inv1 ? REG_T4 : REG_Z1),
    .beta (inv1 ? REG_T5 : REG_T2),
    .v    (inv1 ? REG_X2 : REG_T3),
    .dst  (inv1 ? REG_T5 : REG_T2),
    .ctl  (it_ctl),
    .busy (it_busy),
    .last (it_last)
  );

  always_ff @(posedge clk) begin
    if (!rst && state == ST_INV)
      assert (it_busy) else $error("ecpm_ctrl: inversion sequencer idle in ST_INV");
  end

  // ---------------------------------------------------------------- outputs
  instr_t cur;
  logic   in_prog;

  always_comb begin
    in_prog = 1'b1;
    unique case (state)
      ST_APC:  cur = apc_prog(pc);
      ST_LAD:  cur = lad_prog(pc, kbit);
      ST_PAC1: cur = pac1_prog(pc);
      ST_PAC2: cur = pac2_prog(pc);
      default: begin cur = '0; in_prog = 1'b0; end
    endcase
  end

  always_comb begin
    ctl   = CTRL_NOP;
    ext_a = '0;
    ext_b = '0;
    if (in_prog) begin
      if (!ph) begin
        ctl.addra = cur.ra;
        ctl.addrb = cur.rb;
      end else begin
        ctl.addra = cur.wa_en ? cur.wa : cur.ra;
        ctl.addrb = cur.wb_en ? cur.wb : cur.rb;
        ctl.wea   = cur.wa_en;
        ctl.web   = cur.wb_en;
        ctl.c1    = cur.a_ext ? C1_EXT : C1_AOUT;
        ctl.c3    = cur.c3;
        ext_a     = M'(1);
      end
    end else begin
      unique case (state)
        ST_LD1: begin
          ctl.addra = REG_XP; ctl.wea = 1'b1; ctl.c1 = C1_EXT; ext_a = xp;
          ctl.addrb = REG_X1; ctl.web = 1'b1; ctl.c2 = C2_EXT; ext_b = xp;
        end
        ST_LD2: begin
          ctl.addra = REG_CB; ctl.wea = 1'b1; ctl.c1 = C1_EXT; ext_a = con_b;
          ctl.addrb = REG_YP; ctl.web = 1'b1; ctl.c2 = C2_EXT; ext_b = yp;
        end
        ST_INVF: ctl.addra = inv1 ? REG_T4 : REG_Z1;
        ST_INV:  ctl = it_ctl;
        ST_OUT1: ctl.addra = REG_T2;
        ST_OUT2: ctl.addra = REG_T1;
        default: ;
      endcase
    end
  end

  assign done = (state == ST_OUT2) || (state == ST_OUT3);
  assign busy = (state != ST_IDLE);

  // ---------------------------------------------------------------- FSM
  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= ST_IDLE;
      pc     <= '0;
      ph     <= 1'b0;
      iter   <= '0;
      keyreg <= '0;
      kbit   <= 1'b0;
      inv1   <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          pc <= '0;
          ph <= 1'b0;
          if (din_ext) begin
            keyreg <= key;
            state  <= ST_LD1;
          end else if (start) begin
            state <= ST_APC;
          end
        end
        ST_LD1: state <= ST_LD2;
        ST_LD2: state <= ST_IDLE;
        ST_APC, ST_LAD, ST_PAC1, ST_PAC2: begin
          ph <= ~ph;
          if (ph) begin
            pc <= pc + 1'b1;
            if (state == ST_APC && pc == APC_LAST) begin
              pc    <= '0;
              iter  <= IW'(M - 3);
              state <= ST_CHK;
            end else if (state == ST_LAD && pc == LAD_LAST) begin
              pc <= '0;
              if (iter == 0) begin
                inv1  <= 1'b0;
                state <= ST_INVF;
              end else begin
                iter  <= iter - 1'b1;
                state <= ST_CHK;
              end
            end else if (state == ST_PAC1 && pc == PAC1_LAST) begin
              pc    <= '0;
              state <= ST_INVF;
            end else if (state == ST_PAC2 && pc == PAC2_LAST) begin
              pc    <= '0;
              state <= ST_OUT1;
            end
          end
        end
        ST_CHK: begin
          kbit  <= keyreg[iter];
          state <= ST_LAD;
        end
        ST_INVF: state <= ST_INV;
        ST_INV: if (it_last) begin
          pc <= '0;
          ph <= 1'b0;
          if (inv1) state <= ST_PAC2;
          else begin
            inv1  <= 1'b1;
            state <= ST_PAC1;
          end
        end
        ST_OUT1: state <= ST_OUT2;
        ST_OUT2: state <= ST_OUT3;
        ST_OUT3: state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end
endmodule
