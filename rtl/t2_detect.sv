// t2_detect: Type II transition detector for one pair of adjacent lines.
//
// A Type II transition is the costliest for the coupling capacitance: both
// lines switch, in opposite directions (01 -> 10 or 10 -> 01), so the
// capacitance between them sees twice the voltage swing. Full inversion turns
// such a pair into Type IV (no switching). The scheme II and III decisions
// count these pairs. Combinational.
module t2_detect (
  input  logic [1:0] prev,
  input  logic [1:0] cur,
  output logic       t2
);
  always_comb t2 = (prev[0] ^ prev[1]) & (prev[0] ^ cur[0]) & (prev[1] ^ cur[1]);
endmodule
