// majority_voter: scheme I inversion decision.
//
// Takes the Ty flag of every adjacent line pair and asserts half_invert (odd
// inversion of the flit) when more than half of the NPAIRS pairs gain from
// it, i.e. Ty > (w-1)/2 with w-1 = NPAIRS. The comparison is written as
// 2*Ty > NPAIRS so that no fraction is needed; with NPAIRS odd, as in the
// default 32-line link, there is never a tie. Combinational.
module majority_voter #(
  parameter int unsigned NPAIRS = 31
) (
  input  logic [NPAIRS-1:0] ty_flags,
  output logic              half_invert
);
  localparam int unsigned CW = $clog2(NPAIRS + 1);
  logic [CW-1:0] ty_cnt;

  ones_counter #(.N(NPAIRS)) u_count (.in_bits(ty_flags), .count(ty_cnt));

  always_comb half_invert = ({1'b0, ty_cnt, 1'b0} > (CW + 2)'(NPAIRS));
endmodule
