// tb_encoder_s2: self-checking testbench of the scheme II encoder at its
// default width (32: a 31-bit payload, 33 link lines).
//
// Packets of one head flit and 1..8 body/tail flits are sent with random
// idle cycles between flits. Payloads are drawn to provoke every kind of
// inversion (random, complemented, odd or even lines switching, single-bit
// changes, alternating patterns). Every flit is checked one clock after it
// is presented (the encoder's latency) against a reference encoder that
// classifies transitions from their definitions:
//   - the link word equals the reference encoding,
//   - decoding the link word gives back the payload,
//   - a head flit goes out uninverted,
//   - the link's coupling activity is never above that of the raw flit,
//   - valid and type sidebands follow the input, and idle cycles hold the link.
// Each inversion (none, odd and full) must occur at least once.
module tb_encoder_s2;
  import noc_codec_pkg::*;
  import tb_ref_pkg::*;
  localparam int W  = 32;
  localparam int PW = W - 1;
  localparam int LW = W + 1;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          in_valid;
  flit_type_e    in_type;
  logic [PW-1:0] in_data;
  logic [LW-1:0] link;
  logic          link_valid;
  flit_type_e    link_type;

  int checks = 0, failures = 0;
  int seen[4] = '{0, 0, 0, 0};
  int cost_raw = 0, cost_enc = 0, heads = 0, idles = 0;
  logic [63:0] model_prev = '0, last_payload = '0, exp_link, dec;
  mode_e m;

  encoder_s2 dut (.clk, .rst_n, .in_valid, .in_type, .in_data, .link, .link_valid, .link_type);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic send(flit_type_e t, logic [63:0] payload);
    @(negedge clk);
    in_valid = 1'b1;
    in_type  = t;
    in_data  = payload[PW-1:0];
    exp_link = encode(2, PW, model_prev, payload, t == FLIT_HEAD, m);
    @(posedge clk);
    #1;
    in_valid = 1'b0;
    check(link_valid === 1'b1, "link_valid after one cycle");
    check(link_type === t, "link_type");
    check(link === exp_link[LW-1:0], $sformatf("link %h expected %h (mode %s)", link, exp_link[LW-1:0], m.name()));
    dec = decode(2, PW, 64'(link));
    check(dec[PW-1:0] === payload[PW-1:0], "decoded payload");
    if (t == FLIT_HEAD) check(link[LW-1:PW] == '0, "head flit uninverted");
    check(link_cost(model_prev, 64'(link), LW) <= link_cost(model_prev, payload & ((64'd1 << PW) - 1), LW),
          "coupling activity not increased");
    cost_raw += link_cost(model_prev, payload & ((64'd1 << PW) - 1), LW);
    cost_enc += link_cost(model_prev, 64'(link), LW);
    if (t == FLIT_HEAD) heads++;
    else seen[int'(m)]++;
    model_prev = 64'(link);
  endtask

  initial begin
    in_valid = 1'b0;
    in_type  = FLIT_HEAD;
    in_data  = '0;
    repeat (3) @(posedge clk);
    #1;
    check(link === '0 && link_valid === 1'b0, "reset state");
    rst_n = 1'b1;
    for (int p = 0; p < 400; p++) begin
      int nbody;
      nbody = $urandom_range(1, 8);
      send(FLIT_HEAD, {$urandom(), $urandom()});
      for (int b = 0; b < nbody; b++) begin
        last_payload = gen_payload(model_prev, PW);
        send((b == nbody - 1) ? FLIT_TAIL : FLIT_BODY, last_payload);
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          @(posedge clk);
          #1;
          idles++;
          check(link_valid === 1'b0, "idle: no valid");
          check(64'(link) === model_prev, "idle: link holds");
        end
      end
    end
    $display("heads=%0d idles=%0d none=%0d odd=%0d even=%0d full=%0d", heads, idles,
             seen[0], seen[1], seen[2], seen[3]);
    $display("coupling activity: raw=%0d encoded=%0d", cost_raw, cost_enc);
    check(seen[0] > 0, "inversion mode 0 occurred");
    check(seen[1] > 0, "inversion mode 1 occurred");
    check(seen[3] > 0, "inversion mode 3 occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
