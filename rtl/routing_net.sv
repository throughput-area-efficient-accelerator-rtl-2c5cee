// routing_net: the two 2:1 write-data multiplexers in front of the memory.
//
// c1 chooses what port a writes: the adder result (aout) or external data.
// c2 chooses what port b writes: the arithmetic unit's write-back word
// (dwback: multiplier, copied douta, or squarer) or external data. Having
// both lets one instruction write an addition result and a multiplication or
// square result in the same cycle. The external legs (ext_a, ext_b) carry
// the loaded inputs, or the constant one, as chosen by the control unit.
// Combinational.
module routing_net
  import gf233_pkg::*;
#(
  parameter int unsigned M = 233
) (
  input  c1_e          c1,
  input  c2_e          c2,
  input  logic [M-1:0] ext_a,
  input  logic [M-1:0] ext_b,
  input  logic [M-1:0] aout,
  input  logic [M-1:0] dwback,
  output logic [M-1:0] dina,
  output logic [M-1:0] dinb
);
  assign dina = (c1 == C1_EXT) ? ext_a : aout;
  assign dinb = (c2 == C2_EXT) ? ext_b : dwback;
endmodule
