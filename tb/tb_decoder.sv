// tb_decoder: checks both decoder forms (one tag line for scheme I, two for
// schemes II and III). Payloads are inverted on the odd, even or all lines
// by the testbench, the tags set accordingly, and the decoder must return
// the original payload; random link words are also compared with the
// reference decoder.
module tb_decoder;
  import tb_ref_pkg::*;
  logic [31:0] l1;
  logic [32:0] l2;
  logic [30:0] d1, d2, payload;
  int checks = 0, failures = 0;

  decoder #(.TAGS(1)) dut1 (.link(l1), .data(d1));
  decoder             dut2 (.link(l2), .data(d2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      mode_e m;
      logic [63:0] x;
      payload = 31'($urandom());
      m = mode_e'($urandom_range(0, 3));
      x = 64'(payload) ^ mode_mask(m, 33);       // tags 31 (odd) and 32 (even)
      l2 = x[32:0];
      l1 = (64'(payload) ^ ((m == MODE_ODD) ? mode_mask(MODE_ODD, 32) : 64'd0)) & 64'hFFFF_FFFF;
      #1;
      checks += 2;
      if (d2 !== payload) begin failures++; $display("FAIL tags2 mode=%s got %h exp %h", m.name(), d2, payload); end
      if (d1 !== payload) begin failures++; $display("FAIL tags1 mode=%s got %h exp %h", m.name(), d1, payload); end
      l1 = $urandom();
      l2 = {1'($urandom()), $urandom()};
      #1;
      checks += 2;
      if (64'(d1) !== decode(1, 31, 64'(l1))) begin failures++; $display("FAIL random tags1"); end
      if (64'(d2) !== decode(2, 31, 64'(l2))) begin failures++; $display("FAIL random tags2"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
