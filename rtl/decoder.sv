// decoder: restores an encoded body flit at the destination network interface.
//
// The link carries a W-1 bit payload on lines 0..W-2 followed by TAGS tag
// lines: line W-1 (odd tag) is 1 when the odd lines were inverted, and, with
// TAGS = 2, line W (even tag) is 1 when the even lines were inverted. Full
// inversion sets both. The decoder XORs each odd payload line with the odd
// tag and each even one with the even tag. Use TAGS = 1 for scheme I and
// TAGS = 2 for schemes II and III. With TAGS = 1 the even payload
// lines pass straight through, since scheme I never inverts them. A head flit is sent with its tags at 0
// and so passes unchanged; the decoder needs no flit type.
//
// The scheme places a decoder in each network interface but leaves its
// circuit open; this XOR form is this design's. Combinational.
module decoder #(
  parameter int unsigned W    = 32,
  parameter int unsigned TAGS = 2
) (
  input  logic [W+TAGS-2:0] link,
  output logic [W-2:0]      data
);
  logic odd_tag, even_tag;

  always_comb begin
    odd_tag  = link[W-1];
    even_tag = (TAGS == 2) ? link[W+TAGS-2] : 1'b0;
    for (int i = 0; i <= int'(W) - 2; i++)
      data[i] = link[i] ^ ((i % 2 == 1) ? odd_tag : even_tag);
  end

  initial assert (TAGS == 1 || TAGS == 2) else $error("decoder: TAGS must be 1 or 2");
endmodule
