// tb_routing_net: drives distinct words on all four data inputs and checks
// that each select setting routes the expected one to each memory port.
module tb_routing_net;
  import gf_ref_pkg::*;
  import gf233_pkg::*;
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  c1_e c1;
  c2_e c2;
  logic [M-1:0] ext_a, ext_b, aout, dwback, dina, dinb;
  routing_net dut (.*);

  initial begin
    for (int n = 0; n < 50; n++) begin
      ext_a = rnd(); ext_b = rnd(); aout = rnd(); dwback = rnd();
      for (int s = 0; s < 4; s++) begin
        c1 = c1_e'(s[0]); c2 = c2_e'(s[1]); #1;
        checks++;
        if (dina !== (s[0] ? ext_a : aout)) begin failures++; $display("FAIL dina s=%0d", s); end
        checks++;
        if (dinb !== (s[1] ? ext_b : dwback)) begin failures++; $display("FAIL dinb s=%0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
