// tb_gf_adder: checks GF(2^233) addition: a+0 = a, a+a = 0, commutativity,
// and bitwise agreement with the per-bit sum (a_i != b_i) on random inputs.
module tb_gf_adder;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [M-1:0] a, b, s;
  gf_adder dut (.a(a), .b(b), .sum(s));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s a=%h b=%h s=%h", what, a, b, s); end
  endtask

  initial begin
    fe_t x, y, s1;
    for (int n = 0; n < 200; n++) begin
      x = rnd(); y = rnd();
      a = x; b = '0; #1; chk(s == x, "a+0");
      a = x; b = x;  #1; chk(s == '0, "a+a");
      a = x; b = y;  #1; s1 = s;
      for (int i = 0; i < M; i++) chk(s[i] == (x[i] != y[i]), "bit");
      a = y; b = x;  #1; chk(s == s1, "commute");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
