// tb_module_a: exhaustive check of the scheme II decision for 32 pairs.
// Every (Ty, T2, T4**) with T2 + T4** <= 32 is applied; the expected choice
// is the candidate with the lowest link cost, costs taken relative to no
// inversion (odd: 32 - 2Ty, full: 2(T4** - T2)), staying uninverted on ties.
module tb_module_a;
  import tb_ref_pkg::*;
  localparam int NP = 32;
  logic [5:0] ty, t2, t4;
  logic half_invert, full_invert;
  int checks = 0, failures = 0;
  int n_odd = 0, n_full = 0, n_none = 0;
  mode_e exp;

  module_a dut (.ty_cnt(ty), .t2_cnt(t2), .t4ss_cnt(t4),
                .half_invert(half_invert), .full_invert(full_invert));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a <= NP; a++)
      for (int b = 0; b <= NP; b++)
        for (int c = 0; b + c <= NP; c++) begin
          ty = 6'(a); t2 = 6'(b); t4 = 6'(c);
          #1;
          exp = decide(2, NP, a, 0, b, c);
          checks++;
          case (exp)
            MODE_ODD:  n_odd++;
            MODE_FULL: n_full++;
            default:   n_none++;
          endcase
          if (half_invert !== (exp == MODE_ODD) || full_invert !== (exp == MODE_FULL)) begin
            failures++;
            if (failures < 10) $display("FAIL ty=%0d t2=%0d t4=%0d half=%b full=%b exp=%s",
                                        a, b, c, half_invert, full_invert, exp.name());
          end
        end
    $display("choices: odd=%0d full=%0d none=%0d", n_odd, n_full, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
