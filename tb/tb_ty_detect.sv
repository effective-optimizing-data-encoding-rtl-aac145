// tb_ty_detect: exhaustive check of the odd-inversion gain detector.
//
// Both placements of the odd line are instantiated. For all 16 (prev, cur)
// combinations the flag is compared with the reference: a pair gains when
// its coupling cost, from the transition-type definitions, falls once the
// odd line of the pair is inverted.
module tb_ty_detect;
  import tb_ref_pkg::*;
  logic [1:0] prev, cur;
  logic ty_hi, ty_lo;
  int checks = 0, failures = 0;

  ty_detect #(.ODD_IS_HIGH(1'b1)) dut_hi (.prev(prev), .cur(cur), .ty(ty_hi));
  ty_detect #(.ODD_IS_HIGH(1'b0)) dut_lo (.prev(prev), .cur(cur), .ty(ty_lo));

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
      if (ty_hi !== (pair_cost(prev, cur ^ 2'b10) < pair_cost(prev, cur))) begin
        failures++; $display("FAIL hi prev=%b cur=%b ty=%b", prev, cur, ty_hi);
      end
      if (ty_lo !== (pair_cost(prev, cur ^ 2'b01) < pair_cost(prev, cur))) begin
        failures++; $display("FAIL lo prev=%b cur=%b ty=%b", prev, cur, ty_lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
