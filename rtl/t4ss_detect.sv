// t4ss_detect: Type IV** detector for one pair of adjacent lines.
//
// Type IV means neither line switches. Full inversion would make both lines
// switch; when the lines hold different values (01 or 10) they then switch in
// opposite directions and the pair becomes Type II, the costliest case. Those
// stable-and-different pairs are counted as T4** and weighed against the
// Type II pairs that full inversion removes. Reading T4** as exactly this set
// is this design's interpretation; it is the one for which full inversion
// pays off precisely when T2 > T4**. Combinational.
module t4ss_detect (
  input  logic [1:0] prev,
  input  logic [1:0] cur,
  output logic       t4ss
);
  always_comb t4ss = (prev == cur) && (prev[0] != prev[1]);
endmodule
