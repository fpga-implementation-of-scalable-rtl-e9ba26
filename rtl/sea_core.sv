// sea_core: SEA_{n,b} block cipher, loop architecture (one round per clock).
//
// The scalable encryption algorithm SEA_{n,b} encrypts an n-bit block under an
// n-bit key with a Feistel network on b-bit words; n, b and the round count
// NR are parameters here, so any legal size is obtained by setting them.
// The core keeps two registers: the data state (L, R) and the key state
// (KL, KR). Each clock cycle of a run computes one data round (sea_data_round,
// FE or FD) and, in parallel, one key-schedule round (sea_key_round); the
// controller (sea_ctrl) sequences the round constants, the two key-half
// exchanges and which key half keys the data round.
//
// Because the round count is odd and the second half of the key schedule
// walks back to the start key, the sequence of round keys reads the same
// forwards and backwards. Decryption therefore uses the same key schedule,
// started from the same key, with FD instead of FE; and at the end of a run
// the key register holds the start key again.
//
// Interface: with the core idle, a one-cycle `start` captures `data_in`
// (L = upper half, R = lower half), `key_in` and `decrypt`. NR clock cycles
// later `done` pulses for one cycle and `data_out` = R_NR & L_NR holds the
// cipher text (or plain text) until the next start. `busy` is high during
// the NR round cycles; `start` is ignored while busy. Latency: `done` is high
// in the cycle after the edge that computes round NR, i.e. it rises on the
// NR-th rising edge after the edge that saw `start`. A new `start` is taken
// in that same cycle, so back-to-back blocks take NR+1 cycles each.
//
// The round functions, the key schedule and the one-round-per-cycle loop with
// a parallel key round follow the cipher and the architecture as published;
// the default size SEA_{48,8}, the derived round count, the port list and the
// start/done handshake are this implementation's choices.
module sea_core #(
  parameter int unsigned N  = 48,
  parameter int unsigned B  = 8,
  parameter int unsigned NR = sea_pkg::sea_rounds(N, B)
) (
  input  logic         clk,
  input  logic         rst_n,     // asynchronous, active low
  input  logic         start,
  input  logic         decrypt,   // 0: encrypt, 1: decrypt
  input  logic [N-1:0] key_in,
  input  logic [N-1:0] data_in,
  output logic [N-1:0] data_out,
  output logic         busy,
  output logic         done
);

  if (N % (6 * B) != 0) begin : g_bad_n
    $error("sea_core: N must be a multiple of 6*B");
  end
  if (NR % 2 != 1 || NR < 3) begin : g_bad_nr
    $error("sea_core: NR must be odd and at least 3");
  end

  logic [N/2-1:0] l_q, r_q, kl_q, kr_q;
  logic [N/2-1:0] l_d, r_d, kl_d, kr_d;
  logic           decrypt_q;

  logic           load, round_en, fk_en, key_swap, use_kl;
  logic [B-1:0]   c_const;

  sea_ctrl #(.NR(NR), .B(B)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .load    (load),
    .round_en(round_en),
    .busy    (busy),
    .done    (done),
    .c_const (c_const),
    .fk_en   (fk_en),
    .key_swap(key_swap),
    .use_kl  (use_kl)
  );

  sea_data_round #(.N(N), .B(B)) u_data_round (
    .l      (l_q),
    .r      (r_q),
    .k      (use_kl ? kl_q : kr_q),
    .decrypt(decrypt_q),
    .l_next (l_d),
    .r_next (r_d)
  );

  sea_key_round #(.N(N), .B(B)) u_key_round (
    .kl     (kl_q),
    .kr     (kr_q),
    .c      (c_const),
    .fk_en  (fk_en),
    .swap   (key_swap),
    .kl_next(kl_d),
    .kr_next(kr_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_q       <= '0;
      r_q       <= '0;
      kl_q      <= '0;
      kr_q      <= '0;
      decrypt_q <= 1'b0;
    end else begin
      if (load) begin
        {l_q, r_q}   <= data_in;
        {kl_q, kr_q} <= key_in;
        decrypt_q    <= decrypt;
      end else if (round_en) begin
        l_q  <= l_d;
        r_q  <= r_d;
        kl_q <= kl_d;
        kr_q <= kr_d;
      end
      // Handshake rules: a result is never announced while a block is in
      // flight, and a block is never loaded over a running one.
      assert (!(done && busy)) else $error("sea_core: done while busy");
      assert (!(load && busy)) else $error("sea_core: load while busy");
    end
  end

  // Final exchange of the halves: C = R_NR & L_NR.
  assign data_out = {r_q, l_q};

endmodule
