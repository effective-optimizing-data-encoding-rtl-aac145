// encoder_s3: scheme III flit encoder (odd, even, full or no inversion).
//
// The link has W+1 lines: a W-1 bit payload on lines 0..W-2 and two tag
// lines, W-1 (odd) and W (even), both 0 before encoding. Odd inversion
// inverts the odd lines and so sets tag W-1; even inversion inverts the even
// lines and sets tag W; full inversion is both and sets both tags. W must be
// even.
//
// The candidate flit is compared with the flit last on the link (the output
// register) over all W pairs of adjacent lines. The first stage classifies
// each pair (ty_detect, te_detect, t2_detect, t4ss_detect); the second stage
// counts each class with a ones counter; module_c turns the four counts into
// odd_invert and even_invert, which drive the XOR gates of the odd and the
// even lines. The result is registered onto the link: one flit per cycle,
// one cycle latency.
//
// Head flits are sent uninverted but update the previous-flit register. The
// decision rules and the two-stage structure follow the scheme; timing and
// reset value are this design's.
module encoder_s3
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  flit_type_e   in_type,
  input  logic [W-2:0] in_data,
  output logic [W:0]   link,
  output logic         link_valid,
  output flit_type_e   link_type
);
  localparam int unsigned NPAIRS = W;
  localparam int unsigned CW     = $clog2(NPAIRS + 1);

  logic [W:0]        x, z, odd_mask, even_mask;
  logic [NPAIRS-1:0] ty_flags, te_flags, t2_flags, t4_flags;
  logic [CW-1:0]     ty_cnt, te_cnt, t2_cnt, t4_cnt;
  logic              odd_invert, even_invert, odd_inv, even_inv;

  always_comb begin
    x = {2'b00, in_data};
    for (int i = 0; i <= int'(W); i++) begin
      odd_mask[i]  = (i % 2 == 1);
      even_mask[i] = (i % 2 == 0);
    end
  end

  for (genvar i = 0; i < int'(NPAIRS); i++) begin : g_pair
    ty_detect #(.ODD_IS_HIGH(i % 2 == 0)) u_ty (
      .prev(link[i+1:i]), .cur(x[i+1:i]), .ty(ty_flags[i])
    );
    te_detect #(.EVEN_IS_HIGH(i % 2 == 1)) u_te (
      .prev(link[i+1:i]), .cur(x[i+1:i]), .te(te_flags[i])
    );
    t2_detect   u_t2 (.prev(link[i+1:i]), .cur(x[i+1:i]), .t2(t2_flags[i]));
    t4ss_detect u_t4 (.prev(link[i+1:i]), .cur(x[i+1:i]), .t4ss(t4_flags[i]));
  end

  ones_counter #(.N(NPAIRS)) u_cnt_ty (.in_bits(ty_flags), .count(ty_cnt));
  ones_counter #(.N(NPAIRS)) u_cnt_te (.in_bits(te_flags), .count(te_cnt));
  ones_counter #(.N(NPAIRS)) u_cnt_t2 (.in_bits(t2_flags), .count(t2_cnt));
  ones_counter #(.N(NPAIRS)) u_cnt_t4 (.in_bits(t4_flags), .count(t4_cnt));

  module_c #(.NPAIRS(NPAIRS)) u_dec (
    .ty_cnt(ty_cnt), .te_cnt(te_cnt), .t2_cnt(t2_cnt), .t4ss_cnt(t4_cnt),
    .odd_invert(odd_invert), .even_invert(even_invert)
  );

  always_comb begin
    odd_inv  = odd_invert && (in_type != FLIT_HEAD);
    even_inv = even_invert && (in_type != FLIT_HEAD);
    z = x ^ (odd_inv ? odd_mask : '0) ^ (even_inv ? even_mask : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link       <= '0;
      link_valid <= 1'b0;
      link_type  <= FLIT_HEAD;
    end else begin
      link_valid <= in_valid;
      if (in_valid) begin
        link      <= z;
        link_type <= in_type;
      end
    end
  end

  initial assert (W % 2 == 0 && W >= 4) else $error("encoder_s3: W must be even and at least 4");
endmodule
