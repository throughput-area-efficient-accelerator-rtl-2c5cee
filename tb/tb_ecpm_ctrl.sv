// tb_ecpm_ctrl: checks the control unit on its own, from its outputs.
//
// After loading and start it records the control word of every cycle up to
// the first done cycle and checks: the load writes (xp to XP and X1, b, yp),
// the total of 7223 cycles, the 6-cycle affine-to-projective phase with the
// constant one written to Z1, 231 ladder steps of 29 cycles each whose first
// instruction reads X2 and writes Z1 for key bit 1 and reads X1 and writes
// Z2 for key bit 0, two inversions, done lasting two cycles, and the number
// of squares, products and additions written over the whole run, counted
// from the algorithm.
module tb_ecpm_ctrl;
  import gf233_pkg::*;
  localparam int M = 233;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         start, din_ext, done, busy;
  logic [M-1:0] key, xp, yp, con_b, ext_a, ext_b;
  ctrl_t        ctl;

  ecpm_ctrl dut (.*);

  ctrl_t        tr  [8000];
  logic [M-1:0] tea [8000];

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [M-1:0] rw();
    logic [M-1:0] r;
    for (int i = 0; i < M; i += 32) r[i +: 32] = $urandom();
    return r;
  endfunction

  task automatic run(logic [M-1:0] d);
    int n, base, nsq, nmul, nadd;
    logic bit1;
    addr_t ex1, ez1;
    @(negedge clk);
    key = d; xp = rw(); yp = rw(); con_b = rw(); din_ext = 1;
    @(negedge clk);
    din_ext = 0;
    chk(ctl.wea && ctl.web && ctl.c1 == C1_EXT && ctl.c2 == C2_EXT &&
        ctl.addra == REG_XP && ctl.addrb == REG_X1 && ext_a == xp && ext_b == xp, "load cycle 1");
    @(negedge clk);
    chk(ctl.wea && ctl.web && ctl.addra == REG_CB && ctl.addrb == REG_YP &&
        ext_a == con_b && ext_b == yp, "load cycle 2");
    @(negedge clk);
    chk(!busy, "idle after load");
    start = 1;
    n = 0;
    do begin
      tr[n] = ctl; tea[n] = ext_a; n++;
      @(negedge clk);
      start = 0;
    end while (!done && n < 8000);
    chk(n == 7223, $sformatf("latency %0d, expected 7223", n));
    // affine to projective: cycles 1..6
    chk(tr[2].wea && tr[2].c1 == C1_EXT && tr[2].addra == REG_Z1 && tea[2] == 1, "Z1 = 1");
    chk(tr[2].web && tr[2].c3 == C3_SOUT && tr[2].addrb == REG_Z2, "Z2 = xp^2");
    chk(tr[6].wea && tr[6].addra == REG_X2 && tr[6].c1 == C1_AOUT, "X2 = X2 + b");
    // ladder
    for (int j = 0; j < M-2; j++) begin
      base = 7 + 29*j;
      bit1 = d[M-3-j];
      ex1 = bit1 ? REG_X2 : REG_X1;
      ez1 = bit1 ? REG_Z1 : REG_Z2;
      chk(!tr[base].wea && !tr[base].web, "check cycle writes nothing");
      chk(tr[base+1].addra == ex1 && tr[base+1].addrb == ez1, $sformatf("step %0d reads", j));
      chk(tr[base+2].web && tr[base+2].addrb == ez1 && tr[base+2].c3 == C3_MOUT,
          $sformatf("step %0d first write", j));
      chk(tr[base+29].wea == 1'b0 && tr[base+29].web == 1'b0, "next phase starts with a read");
    end
    nsq = 0; nmul = 0; nadd = 0;
    for (int c = 0; c < n; c++) begin
      if (tr[c].web && tr[c].c2 == C2_DWBACK && tr[c].c3 == C3_SOUT) nsq++;
      if (tr[c].web && tr[c].c2 == C2_DWBACK && tr[c].c3 == C3_MOUT) nmul++;
      if (tr[c].wea && tr[c].c1 == C1_AOUT) nadd++;
    end
    chk(nsq  == 2 + 231*5 + 1 + 2*232, $sformatf("squares %0d", nsq));
    chk(nmul == 231*6 + 8 + 1 + 2*10, $sformatf("products %0d", nmul));
    chk(nadd == 1 + 231*3 + 5 + 1, $sformatf("additions %0d", nadd));
    chk(ctl.addra == REG_T1, "second done cycle follows reading y");
    chk(tr[n-1].addra == REG_T2, "x read before done");
    @(negedge clk);
    chk(done, "done second cycle");
    @(negedge clk);
    chk(!done && !busy, "back to idle");
  endtask

  initial begin
    logic [M-1:0] d;
    start = 0; din_ext = 0; key = '0; xp = '0; yp = '0; con_b = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3; i++) begin
      d = rw(); d[M-1] = 0; d[M-2] = 1;
      if (i == 1) d = {2'b01, {(M-2){1'b0}}};
      run(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
