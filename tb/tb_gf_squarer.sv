// tb_gf_squarer: compares the squarer with the reference product a*a, and
// checks linearity (a+b)^2 = a^2 + b^2.
module tb_gf_squarer;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [M-1:0] a, sq;
  gf_squarer dut (.a(a), .sq(sq));

  initial begin
    fe_t x, y, sx, sy;
    for (int n = 0; n < 200; n++) begin
      x = rnd(); y = rnd();
      a = x; #1; sx = sq;
      checks++; if (sx !== gmul(x, x)) begin failures++; $display("FAIL sq %h", x); end
      a = y; #1; sy = sq;
      a = x ^ y; #1;
      checks++; if (sq !== (sx ^ sy)) begin failures++; $display("FAIL linear"); end
    end
    a = '1 << (M-1); #1;
    checks++; if (sq !== gmul(a, a)) begin failures++; $display("FAIL top bit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
