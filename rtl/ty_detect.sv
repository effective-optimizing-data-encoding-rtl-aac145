// ty_detect: odd-inversion gain detector for one pair of adjacent link lines.
//
// The pair is compared across one flit: prev holds the two lines as they
// were last driven on the link, cur the two bits that would be driven next
// if nothing were inverted. Odd inversion inverts exactly one line of every
// adjacent pair (the odd-indexed one). Following the transition table of the
// scheme, that helps three cases and hurts the other three:
//   Type I*  - only the non-inverted line switches, the lines were equal:
//              becomes Type III (no coupling charge)
//   Type I** - only the inverted line switches: becomes Type IV (none)
//   Type II  - both switch in opposite directions: becomes Type I
// ty is 1 for exactly these cases. Every pair gains or loses exactly one unit
// of coupling activity under inversion, so "more than half the pairs set ty"
// is the odd-inversion condition.
//
// ODD_IS_HIGH says which line of the pair is odd: 1 when the pair starts at
// an even line index (cur[1] is the odd line), 0 otherwise. That parameter
// is this design's way of placing one detector per pair; the detection rule
// is the scheme's. Purely combinational.
module ty_detect #(
  parameter bit ODD_IS_HIGH = 1'b1
) (
  input  logic [1:0] prev,
  input  logic [1:0] cur,
  output logic       ty
);
  logic s_inv, s_keep, unequal;

  always_comb begin
    s_inv   = ODD_IS_HIGH ? (prev[1] ^ cur[1]) : (prev[0] ^ cur[0]);
    s_keep  = ODD_IS_HIGH ? (prev[0] ^ cur[0]) : (prev[1] ^ cur[1]);
    unequal = prev[0] ^ prev[1];
    ty = (s_keep & s_inv & unequal)       // Type II
       | (s_keep & ~s_inv & ~unequal)     // Type I*
       | (~s_keep & s_inv);               // Type I**
  end
endmodule
