// sea_data_round: one SEA Feistel data round, encryption (FE) or decryption (FD).
//
// With F(R, K) = r(S(R + K)) (word-wise addition mod 2^b, S-box layer, bit
// rotation):
//   encryption FE:  L' = R,  R' = R(L) ^ F(R, K)
//   decryption FD:  L' = R,  R' = R^-1(L ^ F(R, K))
// where R / R^-1 is the word rotation. FD undoes FE once the halves are
// exchanged, so one datapath with a two-way select at the output serves both
// directions; the select between the two is this design's choice of sharing.
// Combinational: the core registers L and R and applies one round per clock.
//
// Parameters: N is the block size n (a multiple of 6*B), B the word size b.
module sea_data_round #(
  parameter int unsigned N = 48,
  parameter int unsigned B = 8
) (
  input  logic [N/2-1:0] l,        // left half L_{i-1}
  input  logic [N/2-1:0] r,        // right half R_{i-1}
  input  logic [N/2-1:0] k,        // round key (KR or KL half of the key state)
  input  logic           decrypt,  // 1: FD, 0: FE
  output logic [N/2-1:0] l_next,
  output logic [N/2-1:0] r_next
);

  localparam int unsigned NW = N / (2 * B);

  logic [N/2-1:0] sum, sub, f, l_rot, mix, mix_rot;

  sea_word_add #(.NW(NW), .B(B)) u_add (.a(r), .b_in(k), .sum(sum));
  sea_sbox     #(.NW(NW), .B(B)) u_sbox(.x(sum), .y(sub));
  sea_bit_rot  #(.NW(NW), .B(B)) u_brot(.x(sub), .y(f));

  // Encryption rotates L before the XOR, decryption rotates back after it.
  sea_word_rot #(.NW(NW), .B(B), .INVERSE(1'b0)) u_rot_l  (.x(l),   .y(l_rot));
  sea_word_rot #(.NW(NW), .B(B), .INVERSE(1'b1)) u_rot_inv(.x(mix), .y(mix_rot));

  assign mix = l ^ f;

  always_comb begin
    l_next = r;
    r_next = decrypt ? mix_rot : (l_rot ^ f);
  end

endmodule
