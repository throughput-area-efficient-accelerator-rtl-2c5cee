// itoh_tsujii_seq: control sequencer for Itoh-Tsujii inversion on the shared
// squarer and multiplier.
//
// a^-1 = (a^(2^(m-1)-1))^2. With beta_k = a^(2^k-1), the chain walks the bits
// of m-1 from the top: a "double" step forms beta_2k = (beta_k)^(2^k) * beta_k
// (k squares into scratch word v, then one multiply into word beta), and a set
// bit adds an "increment" step beta_(k+1) = (beta_k)^2 * a (one square, one
// multiply). A final square writes a^-1 to word dst. For m = 233 (m-1 = 232
// = 11101000b) that is 232 squares and 10 multiplications, one per cycle: 242
// cycles, the count the published design gives.
//
// Timing: the caller presents the source address on port a in the cycle it
// pulses go (a fetch cycle). From the next cycle the sequencer drives the
// datapath control (ctl) for 242 cycles, busy high, last high in the final
// one. Every result goes to memory port b through the write-back multiplexer.
// In each cycle port a is given the address of the operand the next cycle
// needs, so the memory's write-first forwarding supplies results written in
// the same cycle; beta and v must be distinct words. Square-and-multiply
// scheduling per cycle is this design's own; the published design gives only the
// operation counts.
module itoh_tsujii_seq
  import gf233_pkg::*;
#(
  parameter int unsigned M = 233
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  go,
  input  addr_t src,    // word holding the element to invert (kept intact)
  input  addr_t beta,   // scratch word for beta_k
  input  addr_t v,      // scratch word for the repeated squares
  input  addr_t dst,    // word that receives the inverse
  output ctrl_t ctl,
  output logic  busy,
  output logic  last
);
  localparam int unsigned EXP = M - 1;
  localparam int unsigned TOP = $clog2(EXP + 1) - 1;   // leading bit of m-1
  localparam int unsigned KW  = $clog2(EXP + 1) + 1;
  localparam logic [31:0] EXPV = 32'(EXP);

  typedef enum logic [2:0] {S_IDLE, S_DSQ, S_DMUL, S_ISQ, S_IMUL, S_FIN} state_e;

  state_e        state;
  logic [KW-1:0] k, cnt;
  logic [4:0]    bitpos;
  logic          first;
  addr_t         r_src, r_beta, r_v, r_dst;
  addr_t         cur_beta;

  assign cur_beta = first ? r_src : r_beta;
  assign busy     = (state != S_IDLE);
  assign last     = (state == S_FIN);

  always_comb begin
    ctl    = CTRL_NOP;
    ctl.c2 = C2_DWBACK;
    unique case (state)
      S_DSQ: begin
        ctl.web   = 1'b1;
        ctl.addrb = r_v;
        ctl.c3    = C3_SOUT;
        ctl.addra = (cnt == 1) ? cur_beta : r_v;
      end
      S_DMUL, S_IMUL: begin
        ctl.web   = 1'b1;
        ctl.addrb = r_beta;
        ctl.c3    = C3_MOUT;
        ctl.addra = r_beta;
      end
      S_ISQ: begin
        ctl.web   = 1'b1;
        ctl.addrb = r_beta;
        ctl.c3    = C3_SOUT;
        ctl.addra = r_src;
      end
      S_FIN: begin
        ctl.web   = 1'b1;
        ctl.addrb = r_dst;
        ctl.c3    = C3_SOUT;
        ctl.addra = r_dst;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      k      <= '0;
      cnt    <= '0;
      bitpos <= '0;
      first  <= 1'b0;
      r_src  <= '0;
      r_beta <= '0;
      r_v    <= '0;
      r_dst  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (go) begin
          r_src  <= src;
          r_beta <= beta;
          r_v    <= v;
          r_dst  <= dst;
          k      <= KW'(1);
          cnt    <= KW'(1);
          first  <= 1'b1;
          bitpos <= 5'(TOP - 1);
          state  <= S_DSQ;
        end
        S_DSQ: begin
          if (cnt == 1) state <= S_DMUL;
          else          cnt   <= cnt - 1'b1;
        end
        S_DMUL: begin
          first <= 1'b0;
          k     <= k << 1;
          if (EXPV[bitpos]) state <= S_ISQ;
          else if (bitpos == 0) state <= S_FIN;
          else begin
            bitpos <= bitpos - 1'b1;
            cnt    <= k << 1;
            state  <= S_DSQ;
          end
        end
        S_ISQ: state <= S_IMUL;
        S_IMUL: begin
          k <= k + 1'b1;
          if (bitpos == 0) state <= S_FIN;
          else begin
            bitpos <= bitpos - 1'b1;
            cnt    <= k + 1'b1;
            state  <= S_DSQ;
          end
        end
        S_FIN: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst && go && state == S_IDLE)
      assert (beta != v) else $error("itoh_tsujii_seq: beta and v must differ");
  end
endmodule
