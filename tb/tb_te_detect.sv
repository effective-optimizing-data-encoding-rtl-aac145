// tb_te_detect: exhaustive check of the even-inversion gain detector.
//
// Both placements of the even line are instantiated. For all 16 (prev, cur)
// combinations the flag is compared with the reference: a pair gains when
// its coupling cost, from the transition-type definitions, falls once the
// even line of the pair is inverted.
module tb_te_detect;
  import tb_ref_pkg::*;
  logic [1:0] prev, cur;
  logic te_hi, te_lo;
  int checks = 0, failures = 0;

  te_detect #(.EVEN_IS_HIGH(1'b1)) dut_hi (.prev(prev), .cur(cur), .te(te_hi));
  te_detect #(.EVEN_IS_HIGH(1'b0)) dut_lo (.prev(prev), .cur(cur), .te(te_lo));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      prev = k[3:2];
      cur  = k[1:0];
      #1;
      checks += 2;
      if (te_hi !== (pair_cost(prev, cur ^ 2'b10) < pair_cost(prev, cur))) begin
        failures++; $display("FAIL hi prev=%b cur=%b te=%b", prev, cur, te_hi);
      end
      if (te_lo !== (pair_cost(prev, cur ^ 2'b01) < pair_cost(prev, cur))) begin
        failures++; $display("FAIL lo prev=%b cur=%b te=%b", prev, cur, te_lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
