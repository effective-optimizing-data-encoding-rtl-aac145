// module_c: scheme III inversion decision (odd, even, full or none).
//
// Inputs are counts over the NPAIRS adjacent line pairs: Ty (pairs gaining
// from odd inversion), Te (pairs gaining from even inversion), T2 (Type II
// pairs) and T4** (stable pairs holding 01/10). Full inversion is signalled
// as odd_invert and even_invert together, so the two outputs drive the odd
// and the even lines of the XOR stage directly.
//
// Rules, with w-1 taken as NPAIRS and G = 2(T2 - T4**):
//   full : G > 2Ty-(w-1), T2 > T4**, G > 2Te-(w-1)          (as specified)
//   odd  : G < 2Ty-(w-1), Ty > (w-1)/2, Te < Ty
//   even : G < 2Te-(w-1), Te > (w-1)/2, Te >= Ty
//   none : otherwise.
// The odd rule's threshold on Ty and the whole even rule (the mirror image of
// the odd rule) are this design's reading; ties between odd and even go to
// even because the odd rule asks Te < Ty. The three rules exclude each other.
// Combinational.
module module_c #(
  parameter int unsigned NPAIRS = 32
) (
  input  logic [$clog2(NPAIRS+1)-1:0] ty_cnt,
  input  logic [$clog2(NPAIRS+1)-1:0] te_cnt,
  input  logic [$clog2(NPAIRS+1)-1:0] t2_cnt,
  input  logic [$clog2(NPAIRS+1)-1:0] t4ss_cnt,
  output logic                        odd_invert,
  output logic                        even_invert
);
  localparam int unsigned CW = $clog2(NPAIRS + 1);
  localparam int unsigned SW = CW + 3;
  typedef logic signed [SW-1:0] sval_t;

  sval_t ty_s, te_s, t2_s, t4_s, full_gain, odd_gain, even_gain;
  logic  do_full, do_odd, do_even;

  always_comb begin
    ty_s = sval_t'({3'b000, ty_cnt});
    te_s = sval_t'({3'b000, te_cnt});
    t2_s = sval_t'({3'b000, t2_cnt});
    t4_s = sval_t'({3'b000, t4ss_cnt});
    full_gain = (t2_s - t4_s) <<< 1;
    odd_gain  = (ty_s <<< 1) - sval_t'(NPAIRS);
    even_gain = (te_s <<< 1) - sval_t'(NPAIRS);

    do_full = (full_gain > odd_gain) && (t2_s > t4_s) && (full_gain > even_gain);
    do_odd  = (full_gain < odd_gain) && (odd_gain > sval_t'(0)) && (te_s < ty_s);
    do_even = (full_gain < even_gain) && (even_gain > sval_t'(0)) && (te_s >= ty_s);

    odd_invert  = do_full || do_odd;
    even_invert = do_full || do_even;
  end
endmodule
