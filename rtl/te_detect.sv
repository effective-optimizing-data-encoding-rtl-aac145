// te_detect: even-inversion gain detector for one pair of adjacent lines.
//
// Even inversion inverts the even-indexed line of every adjacent pair. By the
// scheme's second transition table the pair's coupling activity falls when
//   only the inverted (even) line switches         (Type I  -> Type IV),
//   only the other line switches, lines were equal (Type I  -> Type III),
//   both switch in opposite directions             (Type II -> Type I),
// and rises in every other case. te flags the falling cases; the scheme III
// decision compares their count with the number of pairs.
//
// EVEN_IS_HIGH is 1 when cur[1] is the even line (pair starting at an odd
// line index), 0 when cur[0] is. Combinational; the parameter is this
// design's way of placing the detector.
module te_detect #(
  parameter bit EVEN_IS_HIGH = 1'b0
) (
  input  logic [1:0] prev,
  input  logic [1:0] cur,
  output logic       te
);
  logic s_even, s_other, equal_before;

  always_comb begin
    s_even       = EVEN_IS_HIGH ? (prev[1] ^ cur[1]) : (prev[0] ^ cur[0]);
    s_other      = EVEN_IS_HIGH ? (prev[0] ^ cur[0]) : (prev[1] ^ cur[1]);
    equal_before = ~(prev[0] ^ prev[1]);
    unique case ({s_even, s_other})
      2'b10:   te = 1'b1;              // even line alone switches
      2'b01:   te = equal_before;      // other line alone, from 00/11
      2'b11:   te = ~equal_before;     // both switch, opposite directions
      default: te = 1'b0;              // no switching: inversion adds some
    endcase
  end
endmodule
