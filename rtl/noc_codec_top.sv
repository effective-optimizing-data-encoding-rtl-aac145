// noc_codec_top: end-to-end link encoding between two network interfaces.
//
// The sending side holds the three flit encoders side by side, all fed the
// same flit stream so that their link activity can be compared on the same
// traffic: scheme I (odd or no inversion, W lines), scheme II (odd, full or
// none, W+1 lines) and scheme III (odd, even, full or none, W+1 lines). The
// encoded links leave the top as ports (link1..link3); routers and wires of
// the network sit outside and are left untouched by the encoding. The
// receiving side takes the links back in (rx_link1..rx_link3) and decodes
// each with its own decoder.
//
// Timing: a flit presented with in_valid appears on the links one clock
// later with link_valid; the decoders are combinational, so rx_data follows
// rx_link in the same cycle. Head flits pass unencoded. Placing encoder and
// decoder in the network interfaces follows the scheme; putting all three
// schemes in one top is this design's way of presenting them together.
//
// The sideband assertion is disabled while rst_n is low; a linter may note
// that rst_n is then used both asynchronously (encoder registers) and in a
// clocked expression (the assertion), which is intended.
module noc_codec_top
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  // flit stream from the sending core
  input  logic         in_valid,
  input  flit_type_e   in_type,
  input  logic [W-2:0] in_data,
  // encoded links towards the network
  output logic [W-1:0] link1,
  output logic [W:0]   link2,
  output logic [W:0]   link3,
  output logic         link_valid,
  output flit_type_e   link_type,
  // links arriving from the network at the destination interface
  input  logic [W-1:0] rx_link1,
  input  logic [W:0]   rx_link2,
  input  logic [W:0]   rx_link3,
  output logic [W-2:0] rx_data1,
  output logic [W-2:0] rx_data2,
  output logic [W-2:0] rx_data3
);
  logic       v1, v2, v3;
  flit_type_e ty1, ty2, ty3;

  encoder_s1 #(.W(W)) u_enc1 (
    .clk, .rst_n, .in_valid, .in_type, .in_data,
    .link(link1), .link_valid(v1), .link_type(ty1)
  );
  encoder_s2 #(.W(W)) u_enc2 (
    .clk, .rst_n, .in_valid, .in_type, .in_data,
    .link(link2), .link_valid(v2), .link_type(ty2)
  );
  encoder_s3 #(.W(W)) u_enc3 (
    .clk, .rst_n, .in_valid, .in_type, .in_data,
    .link(link3), .link_valid(v3), .link_type(ty3)
  );

  // The three encoders share one input stream, so their sidebands agree.
  always_comb begin
    link_valid = v1;
    link_type  = ty1;
  end

  a_sideband_agree: assert property (@(posedge clk) disable iff (!rst_n)
    v1 == v2 && v2 == v3 && ty1 == ty2 && ty2 == ty3)
    else $error("noc_codec_top: encoder sidebands disagree");

  decoder #(.W(W), .TAGS(1)) u_dec1 (.link(rx_link1), .data(rx_data1));
  decoder #(.W(W), .TAGS(2)) u_dec2 (.link(rx_link2), .data(rx_data2));
  decoder #(.W(W), .TAGS(2)) u_dec3 (.link(rx_link3), .data(rx_data3));
endmodule
