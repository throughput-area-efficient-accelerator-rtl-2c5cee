// dp_ram: true dual-port memory, DEPTH x W (default 12 x 233, 4-bit address).
//
// Each port (a, b) has one address, one write enable and one data input, as a
// true dual-port block RAM does. Writes happen at the clock edge. Reads are
// synchronous: dout shows, one cycle later, the word at the address presented.
// When the word being read is written in the same cycle, dout shows the new
// data, whether the write comes from the same port (write-first) or from the
// other port. The published design uses a vendor dual-port block RAM; this cross-port
// write-first forwarding is this design's choice and is what lets the
// inversion chain issue one operation per cycle. Both ports writing one
// address in the same cycle is illegal and is flagged by an assertion.
// No reset: words are undefined until written.
module dp_ram #(
  parameter int unsigned W     = 233,
  parameter int unsigned DEPTH = 12,
  parameter int unsigned AW    = 4
) (
  input  logic          clk,
  input  logic [AW-1:0] addra,
  input  logic          wea,
  input  logic [W-1:0]  dina,
  output logic [W-1:0]  douta,
  input  logic [AW-1:0] addrb,
  input  logic          web,
  input  logic [W-1:0]  dinb,
  output logic [W-1:0]  doutb
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wea) mem[addra] <= dina;
    if (web) mem[addrb] <= dinb;

    if (wea)                          douta <= dina;
    else if (web && addrb == addra)   douta <= dinb;
    else                              douta <= mem[addra];

    if (web)                          doutb <= dinb;
    else if (wea && addra == addrb)   doutb <= dina;
    else                              doutb <= mem[addrb];
  end

  always_ff @(posedge clk) begin
    if (wea && web) assert (addra != addrb)
      else $error("dp_ram: both ports write address %0d", addra);
    if (wea) assert (32'(addra) < DEPTH) else $error("dp_ram: port a address out of range");
    if (web) assert (32'(addrb) < DEPTH) else $error("dp_ram: port b address out of range");
  end
endmodule
