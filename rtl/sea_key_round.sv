// sea_key_round: one SEA key-schedule round FK, with the key-half switch.
//
// FK is a Feistel round on the two n/2-bit key halves, keyed by the round
// constant C(i) (all words zero except word 0, which holds i):
//   KL' = KR,  KR' = KL ^ R(r(S(KR + C(i))))
// (word-wise addition mod 2^b, S-box layer, bit rotation, word rotation).
// The key schedule exchanges the two halves twice, in the middle of the
// schedule and at its end; `swap` applies that exchange to the result, and
// `fk_en` = 0 lets the halves through unchanged so that the final exchange
// can be applied on its own. Combinational: the core registers the key state
// and runs this round in the same clock cycle as the data round.
//
// Parameters: N is the key size n (a multiple of 6*B), B the word size b.
module sea_key_round #(
  parameter int unsigned N = 48,
  parameter int unsigned B = 8
) (
  input  logic [N/2-1:0] kl,
  input  logic [N/2-1:0] kr,
  input  logic [B-1:0]   c,        // round constant i (low word of C(i))
  input  logic           fk_en,    // 1: apply FK, 0: keep the halves
  input  logic           swap,     // 1: exchange the halves of the result
  output logic [N/2-1:0] kl_next,
  output logic [N/2-1:0] kr_next
);

  localparam int unsigned NW = N / (2 * B);

  logic [N/2-1:0] cvec, sum, sub, brot, g;
  logic [N/2-1:0] fk_l, fk_r;

  assign cvec = {{(N/2-B){1'b0}}, c};

  sea_word_add #(.NW(NW), .B(B)) u_add (.a(kr), .b_in(cvec), .sum(sum));
  sea_sbox     #(.NW(NW), .B(B)) u_sbox(.x(sum), .y(sub));
  sea_bit_rot  #(.NW(NW), .B(B)) u_brot(.x(sub), .y(brot));
  sea_word_rot #(.NW(NW), .B(B), .INVERSE(1'b0)) u_wrot(.x(brot), .y(g));

  always_comb begin
    if (fk_en) begin
      fk_l = kr;
      fk_r = kl ^ g;
    end else begin
      fk_l = kl;
      fk_r = kr;
    end
    kl_next = swap ? fk_r : fk_l;
    kr_next = swap ? fk_l : fk_r;
  end

endmodule
