// ones_counter: population count of an N-bit vector.
//
// Counts the detector flags of one transition class across all line pairs
// (the "Ones" stage of the scheme II and III encoders). Written as a plain
// combinational sum; synthesis builds the adder tree. Output width is
// $clog2(N+1) so that the all-ones case fits.
module ones_counter #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]         in_bits,
  output logic [$clog2(N+1)-1:0] count
);
  always_comb begin
    count = '0;
    for (int i = 0; i < N; i++)
      count = count + $bits(count)'(in_bits[i]);
  end
endmodule
