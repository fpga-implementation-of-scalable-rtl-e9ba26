// sea_bit_rot: the SEA bit rotation r, a fixed permutation of wires.
//
// Within every group of three words (word 3i, 3i+1, 3i+2): word 3i is rotated
// right by one bit, word 3i+1 is left as it is, word 3i+2 is rotated left by
// one bit. It follows the S-box layer in both round functions and spreads
// each S-box output over neighbouring bit positions. Combinational.
//
// Parameters: NW words (a multiple of 3) of B bits each.
module sea_bit_rot #(
  parameter int unsigned NW = 3,
  parameter int unsigned B  = 8
) (
  input  logic [NW*B-1:0] x,
  output logic [NW*B-1:0] y
);

  for (genvar g = 0; g < NW / 3; g++) begin : g_group
    logic [B-1:0] w0, w2;
    assign w0 = x[(3*g)*B   +: B];
    assign w2 = x[(3*g+2)*B +: B];
    assign y[(3*g)*B   +: B] = {w0[0], w0[B-1:1]};
    assign y[(3*g+1)*B +: B] = x[(3*g+1)*B +: B];
    assign y[(3*g+2)*B +: B] = {w2[B-2:0], w2[B-1]};
  end

endmodule
