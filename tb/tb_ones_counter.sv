// tb_ones_counter: checks the population count at the default width (32)
// and at an odd width (7, exhaustive) against a bit-by-bit loop.
module tb_ones_counter;
  logic [31:0] a;
  logic [5:0]  ca;
  logic [6:0]  b;
  logic [2:0]  cb;
  int checks = 0, failures = 0;

  ones_counter dut32 (.in_bits(a), .count(ca));
  ones_counter #(.N(7)) dut7 (.in_bits(b), .count(cb));

  function automatic int ref_count(logic [31:0] v, int n);
    int s = 0;
    for (int i = 0; i < n; i++) if (v[i]) s++;
    return s;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 128; k++) begin
      b = k[6:0];
      #1;
      checks++;
      if (int'(cb) != ref_count({25'b0, b}, 7)) begin failures++; $display("FAIL N=7 in=%b cnt=%0d", b, cb); end
    end
    for (int k = 0; k < 2000; k++) begin
      case (k)
        0: a = '0;
        1: a = '1;
        default: a = $urandom() & (k[0] ? $urandom() : 32'hFFFF_FFFF);
      endcase
      #1;
      checks++;
      if (int'(ca) != ref_count(a, 32)) begin failures++; $display("FAIL N=32 in=%h cnt=%0d", a, ca); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
