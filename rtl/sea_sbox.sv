// sea_sbox: the SEA substitution layer, bit-sliced over groups of three words.
//
// The 3-bit S-box S = {0,5,6,7,4,3,1,2} is applied in parallel to every bit
// position of every group of three consecutive words (x0, x1, x2) =
// (word 3i, word 3i+1, word 3i+2); bit j of x2,x1,x0 forms the 3-bit input of
// the j-th S-box, x2 being its most significant bit. The table is computed
// with three logic operations on whole words, evaluated in sequence:
//   x0' = (x2 & x1 ) ^ x0
//   x1' = (x2 & x0') ^ x1
//   x2' = (x0' | x1') ^ x2
// which uses only AND, OR and XOR, as the cipher was built for small
// processors with that instruction set. Combinational, no latency.
//
// Parameters: NW words (a multiple of 3) of B bits each.
module sea_sbox #(
  parameter int unsigned NW = 3,
  parameter int unsigned B  = 8
) (
  input  logic [NW*B-1:0] x,
  output logic [NW*B-1:0] y
);

  if (NW % 3 != 0) begin : g_bad_nw
    $error("sea_sbox: NW must be a multiple of 3");
  end

  for (genvar g = 0; g < NW / 3; g++) begin : g_group
    logic [B-1:0] x0, x1, x2, t0, t1, t2;
    assign x0 = x[(3*g)*B   +: B];
    assign x1 = x[(3*g+1)*B +: B];
    assign x2 = x[(3*g+2)*B +: B];
    assign t0 = (x2 & x1) ^ x0;
    assign t1 = (x2 & t0) ^ x1;
    assign t2 = (t0 | t1) ^ x2;
    assign y[(3*g)*B   +: B] = t0;
    assign y[(3*g+1)*B +: B] = t1;
    assign y[(3*g+2)*B +: B] = t2;
  end

endmodule
