// tb_majority_voter: the vote over 31 pairs must be 1 exactly when 16 or
// more flags are set. Vectors with 0..31 set bits at random positions.
module tb_majority_voter;
  logic [30:0] flags;
  logic half_invert;
  int checks = 0, failures = 0;

  majority_voter dut (.ty_flags(flags), .half_invert(half_invert));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 40; rep++) begin
      for (int ones = 0; ones <= 31; ones++) begin
        flags = '0;
        // set 'ones' distinct bits at random positions
        for (int s = 0; s < ones; s++) begin
          int pos;
          do pos = $urandom_range(0, 30); while (flags[pos]);
          flags[pos] = 1'b1;
        end
        #1;
        checks++;
        if (half_invert !== (ones >= 16)) begin
          failures++; $display("FAIL ones=%0d flags=%b out=%b", ones, flags, half_invert);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
