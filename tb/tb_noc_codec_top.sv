// tb_noc_codec_top: end-to-end test of the three encoding schemes at the
// default width (31-bit payload; 32 link lines for scheme I, 33 for II/III).
//
// A stream of packets (one head flit, 1..8 body/tail flits, random idle
// cycles) is sent from one network interface to the other. Between the
// encoder outputs and the decoder inputs the testbench models the network
// as a fixed pipeline of NET_DELAY router hops that forward the link words
// untouched. Checks:
//   - every flit reaches each decoder intact, NET_DELAY + 1 cycles after it
//     was presented (one cycle of encoder latency),
//   - each link word equals the reference encoding of its scheme,
//   - head flits leave uninverted, idle cycles leave the links unchanged.
// Mechanisms counted, each of which must occur: head-flit bypass, idle
// cycles, and per scheme every inversion it can choose. At the end the
// self and coupling switching of each link is printed against the raw flits.
module tb_noc_codec_top;
  import noc_codec_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 32, PW = W - 1, NET_DELAY = 3, NPKT = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  flit_type_e in_type;
  logic [PW-1:0] in_data;
  logic [W-1:0] link1, rx_link1;
  logic [W:0]   link2, link3, rx_link2, rx_link3;
  logic link_valid;
  flit_type_e link_type;
  logic [PW-1:0] rx_data1, rx_data2, rx_data3;

  noc_codec_top dut (
    .clk, .rst_n, .in_valid, .in_type, .in_data,
    .link1, .link2, .link3, .link_valid, .link_type,
    .rx_link1, .rx_link2, .rx_link3, .rx_data1, .rx_data2, .rx_data3
  );

  always #5 clk = ~clk;

  // network model: NET_DELAY register stages per link
  logic [W-1:0] p1 [NET_DELAY];
  logic [W:0]   p2 [NET_DELAY], p3 [NET_DELAY];
  logic         pv [NET_DELAY];
  always_ff @(posedge clk) begin
    p1[0] <= link1; p2[0] <= link2; p3[0] <= link3; pv[0] <= link_valid;
    for (int i = 1; i < NET_DELAY; i++) begin
      p1[i] <= p1[i-1]; p2[i] <= p2[i-1]; p3[i] <= p3[i-1]; pv[i] <= pv[i-1];
    end
  end
  assign rx_link1 = p1[NET_DELAY-1];
  assign rx_link2 = p2[NET_DELAY-1];
  assign rx_link3 = p3[NET_DELAY-1];

  int checks = 0, failures = 0;
  int seen[4][4];
  int heads = 0, idles = 0, delivered = 0;
  int self_raw = 0, coup_raw = 0;
  int self_enc[4], coup_enc[4];
  logic [63:0] prev[4];
  logic [63:0] raw_prev = '0;
  logic [63:0] sent_q[$];
  int          sent_t[$];
  int          cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // receiving interface: compare decoded flits with what was sent
  always @(negedge clk) begin
    if (rst_n && pv[NET_DELAY-1]) begin
      logic [63:0] exp;
      int t;
      exp = sent_q.pop_front();
      t = sent_t.pop_front();
      check(rx_data1 === exp[PW-1:0], "scheme I delivery");
      check(rx_data2 === exp[PW-1:0], "scheme II delivery");
      check(rx_data3 === exp[PW-1:0], "scheme III delivery");
      check(cycle - t == NET_DELAY + 1, $sformatf("end-to-end latency %0d", cycle - t));
      delivered++;
    end
  end

  task automatic send(flit_type_e t, logic [63:0] payload);
    logic [63:0] e[4];
    mode_e m[4];
    @(negedge clk);
    in_valid = 1'b1;
    in_type  = t;
    in_data  = payload[PW-1:0];
    for (int s = 1; s <= 3; s++) e[s] = encode(s, PW, prev[s], payload, t == FLIT_HEAD, m[s]);
    sent_q.push_back(payload & ((64'd1 << PW) - 1));
    sent_t.push_back(cycle);
    @(posedge clk);
    #1;
    in_valid = 1'b0;
    check(link_valid === 1'b1 && link_type === t, "link sideband");
    check(64'(link1) === e[1], "scheme I link word");
    check(64'(link2) === e[2], "scheme II link word");
    check(64'(link3) === e[3], "scheme III link word");
    if (t == FLIT_HEAD) begin
      heads++;
      check(link1[W-1] == 1'b0 && link2[W:W-1] == 2'b00 && link3[W:W-1] == 2'b00, "head uninverted");
    end else
      for (int s = 1; s <= 3; s++) seen[s][int'(m[s])]++;
    self_raw += self_switches(raw_prev, payload & ((64'd1 << PW) - 1), PW);
    coup_raw += link_cost(raw_prev, payload & ((64'd1 << PW) - 1), PW);
    raw_prev = payload & ((64'd1 << PW) - 1);
    self_enc[1] += self_switches(prev[1], 64'(link1), W);
    coup_enc[1] += link_cost(prev[1], 64'(link1), W);
    self_enc[2] += self_switches(prev[2], 64'(link2), W + 1);
    coup_enc[2] += link_cost(prev[2], 64'(link2), W + 1);
    self_enc[3] += self_switches(prev[3], 64'(link3), W + 1);
    coup_enc[3] += link_cost(prev[3], 64'(link3), W + 1);
    prev[1] = 64'(link1);
    prev[2] = 64'(link2);
    prev[3] = 64'(link3);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      prev[s] = '0; self_enc[s] = 0; coup_enc[s] = 0;
      for (int m = 0; m < 4; m++) seen[s][m] = 0;
    end
    in_valid = 1'b0;
    in_type  = FLIT_HEAD;
    in_data  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NPKT; p++) begin
      int nbody;
      nbody = $urandom_range(1, 8);
      send(FLIT_HEAD, {$urandom(), $urandom()});
      for (int b = 0; b < nbody; b++) begin
        send((b == nbody - 1) ? FLIT_TAIL : FLIT_BODY, gen_payload(raw_prev, PW));
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          @(posedge clk);
          #1;
          idles++;
          check(link_valid === 1'b0 && 64'(link1) === prev[1] && 64'(link2) === prev[2]
                && 64'(link3) === prev[3], "idle cycle holds links");
        end
      end
    end
    repeat (NET_DELAY + 3) @(posedge clk);
    #1;
    check(sent_q.size() == 0, "all flits delivered");
    $display("flits delivered=%0d heads=%0d idle cycles=%0d", delivered, heads, idles);
    $display("raw flits : self=%0d coupling=%0d", self_raw, coup_raw);
    for (int s = 1; s <= 3; s++)
      $display("scheme %0d  : self=%0d coupling=%0d  none=%0d odd=%0d even=%0d full=%0d", s,
               self_enc[s], coup_enc[s], seen[s][0], seen[s][1], seen[s][2], seen[s][3]);
    // every mechanism must have happened
    check(heads > 0, "head-flit bypass occurred");
    check(idles > 0, "idle cycles occurred");
    check(seen[1][0] > 0 && seen[1][1] > 0, "scheme I: none and odd occurred");
    check(seen[2][0] > 0 && seen[2][1] > 0 && seen[2][3] > 0, "scheme II: none, odd, full occurred");
    check(seen[3][0] > 0 && seen[3][1] > 0 && seen[3][2] > 0 && seen[3][3] > 0,
          "scheme III: none, odd, even, full occurred");
    check(coup_enc[1] < coup_raw && coup_enc[2] < coup_raw && coup_enc[3] < coup_raw,
          "every scheme lowers coupling activity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
