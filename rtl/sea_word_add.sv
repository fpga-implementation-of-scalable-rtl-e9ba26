// sea_word_add: word-wise modular addition of two nb-word vectors.
//
// Each b-bit word of `a` is added to the word of the same index in `b_in`
// modulo 2^b; carries never cross a word boundary. This is the "+" of the SEA
// round functions (data round: R + K, key round: KR + C(i)). Purely
// combinational, no latency.
//
// Parameters: NW words of B bits each. Word 0 sits in the least significant B
// bits.
module sea_word_add #(
  parameter int unsigned NW = 3,
  parameter int unsigned B  = 8
) (
  input  logic [NW*B-1:0] a,
  input  logic [NW*B-1:0] b_in,
  output logic [NW*B-1:0] sum
);

  for (genvar w = 0; w < NW; w++) begin : g_word
    assign sum[w*B +: B] = a[w*B +: B] + b_in[w*B +: B];
  end

endmodule
