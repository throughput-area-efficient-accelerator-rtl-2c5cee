// tb_kara_mul: compares the three-level Karatsuba polynomial product (no
// reduction) with a bit-loop carry-less product, at the default 233-bit size.
module tb_kara_mul;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [M-1:0]   a, b;
  logic [2*M-2:0] p;
  kara_mul dut (.a(a), .b(b), .p(p));

  task automatic chk(fe_t x, fe_t y);
    logic [2*M-2:0] exp;
    a = x; b = y; #1;
    exp = clmul(x, y);
    checks++;
    if (p !== exp) begin failures++; $display("FAIL kara a=%h b=%h", x, y); end
  endtask

  initial begin
    chk('1, '1);
    chk(fe_t'(1), '1);
    for (int i = 0; i < M; i += 7) chk(fe_t'(1) << i, rnd());
    for (int n = 0; n < 300; n++) chk(rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
