// tb_t2_detect: exhaustive check of the Type II detector against the
// definition (both lines switch, in opposite directions).
module tb_t2_detect;
  logic [1:0] prev, cur;
  logic t2;
  int checks = 0, failures = 0;
  bit exp;

  t2_detect dut (.prev(prev), .cur(cur), .t2(t2));

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
      // rising on one line while falling on the other
      exp = (prev[0] == 0 && cur[0] == 1 && prev[1] == 1 && cur[1] == 0)
         || (prev[0] == 1 && cur[0] == 0 && prev[1] == 0 && cur[1] == 1);
      checks++;
      if (t2 !== exp) begin failures++; $display("FAIL prev=%b cur=%b t2=%b", prev, cur, t2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
