// sea_word_rot: the SEA word rotation R (or its inverse), a fixed permutation.
//
// R moves word i to position i+1 and the most significant word to position 0,
// i.e. the n/2-bit half is rotated towards its most significant end by one
// word. With INVERSE = 1 the rotation goes the other way (R^-1, used by the
// decryption round). Combinational.
//
// Parameters: NW words of B bits each; INVERSE selects R^-1.
module sea_word_rot #(
  parameter int unsigned NW      = 3,
  parameter int unsigned B       = 8,
  parameter bit          INVERSE = 1'b0
) (
  input  logic [NW*B-1:0] x,
  output logic [NW*B-1:0] y
);

  if (INVERSE) begin : g_inv
    assign y = {x[B-1:0], x[NW*B-1:B]};
  end else begin : g_fwd
    assign y = {x[(NW-1)*B-1:0], x[NW*B-1 -: B]};
  end

endmodule
