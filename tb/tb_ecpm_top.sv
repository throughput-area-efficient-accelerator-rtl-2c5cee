// tb_ecpm_top: end-to-end test of the point multiplier at its default size.
//
// Computes d*P for the NIST B-233 base point (keys 2^231, 2^232-1 and
// random) and for points on random
// curves (a random affine point fixes b), compares x and y with an affine
// double-and-add reference, and checks the latency of 7223 cycles from the
// start cycle to the first done cycle. It also counts how often each
// mechanism of the design ran: external loading, the constant-one write,
// ladder steps with key bit 1 and with key bit 0, both inversions,
// instructions that write two results at once, and same-cycle forwarding in
// the memory; each must have happened at least once.
module tb_ecpm_top;
  import gf_ref_pkg::*;
  import gf233_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  initial begin
    #8000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         start, din_ext, done;
  logic [M-1:0] key, xp, yp, con_b, doutf;

  ecpm_top dut (.clk, .rst, .start, .din_ext, .key, .xp, .yp, .con_b, .done, .doutf);

  // mechanism counters
  int n_load, n_one, n_bit1, n_bit0, n_inv, n_dual, n_fwd;
  always @(posedge clk) if (!rst) begin
    if (dut.ctl.c1 == C1_EXT && dut.ctl.c2 == C2_EXT && dut.ctl.wea && dut.ctl.web) n_load++;
    if (dut.ctl.c1 == C1_EXT && dut.ctl.c2 == C2_DWBACK && dut.ctl.wea) n_one++;
    if (dut.u_ctrl.state == dut.u_ctrl.ST_CHK) begin
      if (dut.u_ctrl.keyreg[dut.u_ctrl.iter]) n_bit1++; else n_bit0++;
    end
    if (dut.u_ctrl.u_inv.last) n_inv++;
    if (dut.ctl.c1 == C1_AOUT && dut.ctl.wea && dut.ctl.web) n_dual++;
    if (dut.u_ctrl.u_inv.busy && dut.ctl.web && dut.ctl.addrb == dut.ctl.addra) n_fwd++;
  end

  task automatic run(fe_t d, fe_t x, fe_t y, fe_t b, fe_t ca, string name);
    pt_t p, q;
    fe_t rx, ry;
    int cyc;
    p = '{inf: 1'b0, x: x, y: y};
    q = pmul(d, p, ca);
    @(negedge clk);
    key = d; xp = x; yp = y; con_b = b; din_ext = 1;
    @(negedge clk);
    din_ext = 0;
    repeat (3) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 20000) begin @(negedge clk); cyc++; end
    rx = doutf;
    @(negedge clk);
    ry = doutf;
    checks++; if (rx !== q.x) begin failures++; $display("FAIL %s x: got %h exp %h", name, rx, q.x); end
    checks++; if (ry !== q.y) begin failures++; $display("FAIL %s y: got %h exp %h", name, ry, q.y); end
    checks++; if (cyc != 7223) begin failures++; $display("FAIL %s latency %0d, expected 7223", name, cyc); end
    $display("%s: d*P done in %0d cycles", name, cyc);
    @(negedge clk);
    checks++; if (done) begin failures++; $display("FAIL %s done longer than 2 cycles", name); end
  endtask

  function automatic fe_t rkey();
    fe_t d = rnd();
    d[M-1] = 1'b0;
    d[M-2] = 1'b1;
    return d;
  endfunction

  initial begin
    fe_t gx, gy, b, x, y, ca;
    start = 0; din_ext = 0; key = '0; xp = '0; yp = '0; con_b = '0;
    n_load = 0; n_one = 0; n_bit1 = 0; n_bit0 = 0; n_inv = 0; n_dual = 0; n_fwd = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // NIST B-233: y^2 + xy = x^3 + x^2 + b
    b  = 233'h066_647EDE6C_332C7F8C_0923BB58_213B333B_20E9CE42_81FE115F_7D8F90AD;
    gx = 233'h0FA_C9DFCBAC_8313BB21_39F1BB75_5FEF65BC_391F8B36_F8F8EB73_71FD558B;
    gy = 233'h100_6A08A419_03350678_E58528BE_BF8A0BEF_F867A7CA_36716F7E_01F81052;
    checks++; if (curve_b(gx, gy, fe_t'(1)) !== b) begin failures++; $display("FAIL B-233 point not on curve"); end
    run(rkey(), gx, gy, b, fe_t'(1), "B-233 random key");
    run(fe_t'(1) << (M-2), gx, gy, b, fe_t'(1), "B-233 key 2^231");
    run({2'b01, {(M-2){1'b1}}}, gx, gy, b, fe_t'(1), "B-233 key 2^232-1");
    run(rkey(), gx, gy, b, fe_t'(1), "B-233 random key");
    // random curve through a random point, a = 1 and a = 0
    for (int i = 0; i < 2; i++) begin
      x = rnd(); y = rnd(); ca = fe_t'(i);
      run(rkey(), x, y, curve_b(x, y, ca), ca, "random curve");
    end
    checks++; if (n_load == 0) begin failures++; $display("FAIL no external load"); end
    checks++; if (n_one  == 0) begin failures++; $display("FAIL no constant-one write"); end
    checks++; if (n_bit1 == 0) begin failures++; $display("FAIL no ladder step with key bit 1"); end
    checks++; if (n_bit0 == 0) begin failures++; $display("FAIL no ladder step with key bit 0"); end
    checks++; if (n_inv  != 12) begin failures++; $display("FAIL %0d inversions, expected 12", n_inv); end
    checks++; if (n_dual == 0) begin failures++; $display("FAIL no dual-write instruction"); end
    checks++; if (n_fwd  == 0) begin failures++; $display("FAIL no same-cycle forwarding"); end
    $display("mechanisms: loads=%0d one=%0d bit1=%0d bit0=%0d inversions=%0d dual=%0d fwd=%0d",
             n_load, n_one, n_bit1, n_bit0, n_inv, n_dual, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
