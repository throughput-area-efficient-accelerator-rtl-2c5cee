// tb_gf_reduce: reduces carry-less products and compares with the
// shift-and-add modular product; also checks that inputs below degree 233
// pass unchanged and that z^233 reduces to z^74 + 1.
module tb_gf_reduce;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [2*M-2:0] c;
  logic [M-1:0]   r;
  gf_reduce dut (.c(c), .r(r));

  task automatic chk(fe_t exp, string what);
    checks++;
    if (r !== exp) begin failures++; $display("FAIL %s c=%h r=%h exp=%h", what, c, r, exp); end
  endtask

  initial begin
    fe_t x, y;
    fe_t zk;
    zk = '0; zk[0] = 1'b1; zk[K] = 1'b1;
    c = '0; c[M] = 1'b1; #1; chk(zk, "z^233");
    c = '1; c[2*M-2:M] = '0; #1; chk('1, "no-reduce");
    for (int n = 0; n < 300; n++) begin
      x = rnd(); y = rnd();
      c = clmul(x, y); #1; chk(gmul(x, y), "product");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
