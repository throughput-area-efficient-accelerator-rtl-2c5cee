// tb_gf_mult: checks the modular multiplier (Karatsuba + reduction) against a
// shift-and-add reference on random and corner-case operands.
module tb_gf_mult;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [M-1:0] a, b, p;

  gf_mult dut (.a(a), .b(b), .p(p));

  task automatic check(fe_t x, fe_t y);
    fe_t exp;
    a = x; b = y;
    #1;
    exp = gmul(x, y);
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL gf_mult a=%h b=%h got %h exp %h", x, y, p, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, rnd());
    check(fe_t'(1), rnd());
    check('1, '1);
    check(fe_t'(1) << (M-1), fe_t'(1) << (M-1));
    for (int i = 0; i < 300; i++) check(rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
