// tb_module_c: exhaustive check of the scheme III decision on an 8-pair
// instance and random checks on the default 32-pair one. The expected choice
// compares the cost change of each candidate relative to no inversion
// (odd: NP - 2Ty, even: NP - 2Te, full: 2(T4** - T2)); ties between odd and
// even go to even.
module tb_module_c;
  import tb_ref_pkg::*;
  logic [5:0] ty, te, t2, t4;
  logic [3:0] sy, se, s2, s4;
  logic odd32, even32, odd8, even8;
  int checks = 0, failures = 0;
  int seen[4] = '{0, 0, 0, 0};

  module_c dut32 (.ty_cnt(ty), .te_cnt(te), .t2_cnt(t2), .t4ss_cnt(t4),
                  .odd_invert(odd32), .even_invert(even32));
  module_c #(.NPAIRS(8)) dut8 (.ty_cnt(sy), .te_cnt(se), .t2_cnt(s2), .t4ss_cnt(s4),
                               .odd_invert(odd8), .even_invert(even8));

  task automatic check(int np, int a, int e, int b, int c, logic o, logic v);
    mode_e exp = decide(3, np, a, e, b, c);
    logic eo = (exp == MODE_ODD) || (exp == MODE_FULL);
    logic ev = (exp == MODE_EVEN) || (exp == MODE_FULL);
    checks++;
    seen[int'(exp)]++;
    if (o !== eo || v !== ev) begin
      failures++;
      if (failures < 10) $display("FAIL np=%0d ty=%0d te=%0d t2=%0d t4=%0d odd=%b even=%b exp=%s",
                                  np, a, e, b, c, o, v, exp.name());
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ty = '0; te = '0; t2 = '0; t4 = '0;
    for (int a = 0; a <= 8; a++)
      for (int e = 0; e <= 8; e++)
        for (int b = 0; b <= 8; b++)
          for (int c = 0; b + c <= 8; c++) begin
            sy = 4'(a); se = 4'(e); s2 = 4'(b); s4 = 4'(c);
            #1;
            check(8, a, e, b, c, odd8, even8);
          end
    for (int k = 0; k < 20000; k++) begin
      int a, e, b, c;
      a = $urandom_range(0, 32);
      e = $urandom_range(0, 32);
      b = $urandom_range(0, 32);
      c = $urandom_range(0, 32 - b);
      ty = 6'(a); te = 6'(e); t2 = 6'(b); t4 = 6'(c);
      #1;
      check(32, a, e, b, c, odd32, even32);
    end
    $display("choices: none=%0d odd=%0d even=%0d full=%0d", seen[0], seen[1], seen[2], seen[3]);
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (seen[m] == 0) begin failures++; $display("FAIL choice %0d never made", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
