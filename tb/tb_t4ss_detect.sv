// tb_t4ss_detect: exhaustive check of the Type IV** detector: flagged pairs
// must be exactly the stable pairs that full inversion turns into Type II.
module tb_t4ss_detect;
  import tb_ref_pkg::*;
  logic [1:0] prev, cur;
  logic t4ss;
  int checks = 0, failures = 0;
  bit exp;

  t4ss_detect dut (.prev(prev), .cur(cur), .t4ss(t4ss));

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
      exp = (prev == cur) && (pair_cost(prev, ~cur) == 2);
      checks++;
      if (t4ss !== exp) begin failures++; $display("FAIL prev=%b cur=%b t4ss=%b", prev, cur, t4ss); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
