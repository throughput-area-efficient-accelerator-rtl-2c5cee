// tb_arith_unit: checks the adder output and all three write-back selects
// (product, copy of douta, square of douta) against the reference arithmetic.
module tb_arith_unit;
  import gf_ref_pkg::*;
  import gf233_pkg::*;
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [M-1:0] douta, doutb, aout, dwback;
  c3_e c3;
  arith_unit dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s a=%h b=%h", what, douta, doutb); end
  endtask

  initial begin
    for (int n = 0; n < 150; n++) begin
      douta = rnd(); doutb = rnd();
      c3 = C3_MOUT;  #1; chk(dwback === gmul(douta, doutb), "mout");
      chk(aout === (douta ^ doutb), "aout");
      c3 = C3_DOUTA; #1; chk(dwback === douta, "douta");
      c3 = C3_SOUT;  #1; chk(dwback === gmul(douta, douta), "sout");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
