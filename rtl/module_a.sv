// module_a: scheme II inversion decision (odd, full or none).
//
// Inputs are the counts, over all NPAIRS adjacent line pairs, of
//   ty_cnt   pairs that gain from odd inversion,
//   t2_cnt   Type II pairs (removed by full inversion),
//   t4ss_cnt Type IV** pairs (turned into Type II by full inversion).
// Measured in units of coupling activity, odd inversion changes the link cost
// by NPAIRS - 2*Ty and full inversion by 2*(T4** - T2). The scheme's rules,
// with w-1 taken as the number of pairs compared:
//   odd  (half_invert): 2(T2 - T4**) < 2Ty - (w-1)  and  Ty > (w-1)/2
//   full (full_invert): 2(T2 - T4**) > 2Ty - (w-1)  and  T2 > T4**
//   otherwise the flit is sent as it is.
// Both comparisons are strict as in the scheme; at an exact tie the flit is
// left uninverted. Arithmetic is signed, in a width that holds 2*NPAIRS.
// Combinational.
module module_a #(
  parameter int unsigned NPAIRS = 32
) (
  input  logic [$clog2(NPAIRS+1)-1:0] ty_cnt,
  input  logic [$clog2(NPAIRS+1)-1:0] t2_cnt,
  input  logic [$clog2(NPAIRS+1)-1:0] t4ss_cnt,
  output logic                        half_invert,
  output logic                        full_invert
);
  localparam int unsigned CW = $clog2(NPAIRS + 1);
  localparam int unsigned SW = CW + 3;
  typedef logic signed [SW-1:0] sval_t;

  sval_t ty_s, t2_s, t4_s, full_gain, odd_gain;

  always_comb begin
    ty_s = sval_t'({3'b000, ty_cnt});
    t2_s = sval_t'({3'b000, t2_cnt});
    t4_s = sval_t'({3'b000, t4ss_cnt});
    full_gain = (t2_s - t4_s) <<< 1;                 // 2(T2 - T4**)
    odd_gain  = (ty_s <<< 1) - sval_t'(NPAIRS);      // 2Ty - (w-1)
    half_invert = (full_gain < odd_gain) && (odd_gain > sval_t'(0));
    full_invert = (full_gain > odd_gain) && (t2_s > t4_s);
  end
endmodule
