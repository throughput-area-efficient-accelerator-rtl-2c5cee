// tb_dp_ram: random reads and writes on both ports against a model of the
// memory: synchronous write, one-cycle read latency, write-first on the same
// port and forwarding of the other port's write to the same address.
module tb_dp_ram;
  localparam int W = 233, D = 12;
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic clk = 0;
  always #5 clk = ~clk;
  logic [3:0]   addra, addrb;
  logic         wea, web;
  logic [W-1:0] dina, dinb, douta, doutb;
  logic [W-1:0] model [D];
  logic [W-1:0] expa, expb;
  int fwd = 0;

  dp_ram dut (.*);

  function automatic logic [W-1:0] rw();
    logic [W-1:0] r;
    for (int i = 0; i < W; i += 32) r[i +: 32] = $urandom();
    return r;
  endfunction

  initial begin
    wea = 0; web = 0; addra = 0; addrb = 0;
    // fill every word through alternating ports
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      model[i] = rw();
      if (i % 2 == 0) begin wea = 1; web = 0; addra = 4'(i); dina = model[i]; end
      else            begin wea = 0; web = 1; addrb = 4'(i); dinb = model[i]; end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      addra = 4'($urandom_range(D-1)); addrb = 4'($urandom_range(D-1));
      wea = ($urandom_range(2) == 0); web = ($urandom_range(2) == 0);
      if (wea && web && addra == addrb) web = 0;
      dina = rw(); dinb = rw();
      expa = wea ? dina : (web && addrb == addra) ? dinb : model[addra];
      expb = web ? dinb : (wea && addra == addrb) ? dina : model[addrb];
      if ((web && addrb == addra && !wea) || (wea && addra == addrb && !web)) fwd++;
      if (wea) model[addra] = dina;
      if (web) model[addrb] = dinb;
      @(posedge clk); #1;
      checks++; if (douta !== expa) begin failures++; $display("FAIL douta n=%0d", n); end
      checks++; if (doutb !== expb) begin failures++; $display("FAIL doutb n=%0d", n); end
    end
    checks++; if (fwd == 0) begin failures++; $display("FAIL no cross-port forwarding exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
