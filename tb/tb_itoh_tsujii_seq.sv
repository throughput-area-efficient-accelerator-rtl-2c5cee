// tb_itoh_tsujii_seq: runs the inversion sequencer on the real datapath
// (memory, routing network, arithmetic unit). Loads a random element, runs
// an inversion, and checks the result against a Fermat inverse, that
// a * a^-1 = 1, that the source word is left intact, and that the run takes
// exactly 232 squares + 10 multiplications = 242 cycles.
module tb_itoh_tsujii_seq;
  import gf_ref_pkg::*;
  import gf233_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic   go, busy, last;
  addr_t  src, beta, v, dst;
  ctrl_t  seq_ctl, tb_ctl, ctl;
  logic   tb_mode;
  logic [M-1:0] ext_b, dina, dinb, douta, doutb, aout, dwback;

  itoh_tsujii_seq dut (.clk, .rst, .go, .src, .beta, .v, .dst, .ctl(seq_ctl), .busy, .last);

  assign ctl = tb_mode ? tb_ctl : seq_ctl;
  routing_net u_rn (.c1(ctl.c1), .c2(ctl.c2), .ext_a('0), .ext_b, .aout, .dwback, .dina, .dinb);
  dp_ram u_mem (.clk, .addra(ctl.addra), .wea(ctl.wea), .dina, .douta,
                .addrb(ctl.addrb), .web(ctl.web), .dinb, .doutb);
  arith_unit u_au (.douta, .doutb, .c3(ctl.c3), .aout, .dwback);

  int sq_cycles, mul_cycles;
  always @(posedge clk) if (!tb_mode && !rst && busy) begin
    if (seq_ctl.web && seq_ctl.c3 == C3_SOUT) sq_cycles++;
    if (seq_ctl.web && seq_ctl.c3 == C3_MOUT) mul_cycles++;
  end

  task automatic run(fe_t a, addr_t s, addr_t bt, addr_t vv, addr_t d);
    int cyc;
    fe_t res, exp;
    // write a into word s through port b
    @(negedge clk);
    tb_mode = 1; tb_ctl = CTRL_NOP; tb_ctl.addrb = s; tb_ctl.web = 1; tb_ctl.c2 = C2_EXT; ext_b = a;
    // fetch cycle with go
    @(negedge clk);
    tb_ctl = CTRL_NOP; tb_ctl.addra = s;
    src = s; beta = bt; v = vv; dst = d; go = 1;
    @(negedge clk);
    go = 0; tb_mode = 0; sq_cycles = 0; mul_cycles = 0;
    cyc = 0;
    while (!last && cyc < 1000) begin @(negedge clk); cyc++; end
    cyc++;                          // the cycle with last
    @(negedge clk);
    tb_mode = 1; tb_ctl = CTRL_NOP; tb_ctl.addra = d; tb_ctl.addrb = s;
    @(negedge clk);
    res = douta;
    exp = ginv(a);
    checks++; if (res !== exp) begin failures++; $display("FAIL inverse of %h: got %h exp %h", a, res, exp); end
    checks++; if (gmul(res, a) !== fe_t'(1)) begin failures++; $display("FAIL a*inv != 1"); end
    checks++; if (doutb !== a) begin failures++; $display("FAIL source word changed"); end
    checks++; if (cyc != 242) begin failures++; $display("FAIL cycles %0d, expected 242", cyc); end
    checks++; if (sq_cycles != 232 || mul_cycles != 10) begin
      failures++; $display("FAIL %0d squares %0d multiplications", sq_cycles, mul_cycles); end
  endtask

  initial begin
    tb_mode = 1; tb_ctl = CTRL_NOP; go = 0; ext_b = '0;
    src = '0; beta = '0; v = '0; dst = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(fe_t'(1), 4'd4, 4'd8, 4'd9, 4'd8);
    run(rnd(), 4'd4, 4'd8, 4'd9, 4'd8);
    run(rnd(), 4'd10, 4'd11, 4'd5, 4'd11);
    run(rnd(), 4'd0, 4'd1, 4'd2, 4'd3);
    for (int i = 0; i < 4; i++) run(rnd(), 4'(i), 4'(i + 4), 4'(i + 8), 4'(i + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
