// encoder_s1: scheme I flit encoder (odd inversion or none).
//
// The link has W lines: a W-1 bit payload on lines 0..W-2 and the inv line
// W-1. Before encoding the inv line is 0; odd inversion inverts every
// odd-indexed line, the inv line included (W is even), so inv = 1 marks an
// odd-inverted flit and the decoder can undo it.
//
// Each cycle with in_valid, the candidate flit is compared, pair of adjacent
// lines by pair, with the flit last driven on the link (held in the output
// register, which doubles as the "previous encoded" register). One ty_detect
// per pair flags pairs whose coupling activity odd inversion would lower; the
// majority voter inverts when more than half of the W-1 pairs do. The XOR
// stage then inverts the odd lines, and the result is registered onto the
// link: one flit per cycle, one cycle latency. The lines hold their value
// while no flit is sent, so an idle link does not toggle.
//
// Head flits are never encoded (they go out with inv = 0) but still update
// the previous-flit register, since they are what the link last carried.
// The rule and structure follow the scheme; the one-cycle register timing,
// the zero reset value and the head-flit register update are this design's.
module encoder_s1
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  flit_type_e   in_type,
  input  logic [W-2:0] in_data,
  output logic [W-1:0] link,
  output logic         link_valid,
  output flit_type_e   link_type
);
  localparam int unsigned NPAIRS = W - 1;

  logic [W-1:0]      x, z, odd_mask;
  logic [NPAIRS-1:0] ty_flags;
  logic              half_invert, invert;

  always_comb begin
    x = {1'b0, in_data};
    for (int i = 0; i < int'(W); i++) odd_mask[i] = (i % 2 == 1);
  end

  for (genvar i = 0; i < int'(NPAIRS); i++) begin : g_pair
    ty_detect #(.ODD_IS_HIGH(i % 2 == 0)) u_ty (
      .prev(link[i+1:i]), .cur(x[i+1:i]), .ty(ty_flags[i])
    );
  end

  majority_voter #(.NPAIRS(NPAIRS)) u_vote (.ty_flags(ty_flags), .half_invert(half_invert));

  always_comb begin
    invert = half_invert && (in_type != FLIT_HEAD);
    z      = invert ? (x ^ odd_mask) : x;
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

  initial assert (W % 2 == 0 && W >= 4) else $error("encoder_s1: W must be even and at least 4");
endmodule
