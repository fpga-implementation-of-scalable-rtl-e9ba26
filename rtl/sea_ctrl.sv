// sea_ctrl: round controller of the SEA loop architecture.
//
// A two-state machine (IDLE, RUN) with a round counter. A `start` pulse seen
// in IDLE asserts `load` for that cycle (the core captures text and key) and
// moves to RUN, where the counter walks i = 1 .. NR, one round per clock.
// For round i it tells the key round and the data round what to do, following
// the key scheduling of the cipher with h = floor(NR/2):
//   - constant C(i): i for i <= h, then NR - i (h, h-1, .., 1) for the
//     second half, which walks the key schedule back towards the start key;
//   - fk_en: a key round is computed for i = 1 .. NR-1;
//   - key_swap: the halves are exchanged when K_h is written (i = h) and,
//     after the last data round has used K_{NR-1}, at i = NR;
//   - use_kl: data rounds 1 .. h+1 are keyed with KR, rounds h+2 .. NR
//     with KL.
// After round NR the machine returns to IDLE and pulses `done` for one cycle,
// raised by the NR-th clock edge after the edge that saw `start` (a start is
// accepted again in that cycle). A `start` while busy is
// ignored. The state encoding and the start/done handshake are this design's
// own choices.
//
// Parameters: NR is the (odd) number of rounds, B the word size, which bounds
// the constant (taken modulo 2^B).
module sea_ctrl #(
  parameter int unsigned NR = 51,
  parameter int unsigned B  = 8
) (
  input  logic         clk,
  input  logic         rst_n,    // asynchronous, active low
  input  logic         start,
  output logic         load,     // capture text, key and mode this cycle
  output logic         round_en, // a round is computed this cycle
  output logic         busy,
  output logic         done,     // one-cycle pulse: result valid
  output logic [B-1:0] c_const,  // round constant (low word of C(i))
  output logic         fk_en,
  output logic         key_swap,
  output logic         use_kl
);

  localparam int unsigned H  = NR / 2;
  localparam int unsigned CW = $clog2(NR + 1);

  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t        state_q;
  logic [CW-1:0] rnd_q;    // current round index i, 1 .. NR in S_RUN
  logic          done_q;
  logic [CW-1:0] cnt;

  assign busy     = (state_q == S_RUN);
  assign load     = (state_q == S_IDLE) && start;
  assign round_en = busy;
  assign done     = done_q;

  always_comb begin
    if (rnd_q <= CW'(H)) cnt = rnd_q;
    else                 cnt = CW'(NR) - rnd_q;
    c_const  = B'(cnt);
    fk_en    = busy && (rnd_q < CW'(NR));
    key_swap = busy && ((rnd_q == CW'(H)) || (rnd_q == CW'(NR)));
    use_kl   = (rnd_q > CW'(H + 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      rnd_q   <= '0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            state_q <= S_RUN;
            rnd_q   <= CW'(1);
          end
        end
        S_RUN: begin
          if (rnd_q == CW'(NR)) begin
            state_q <= S_IDLE;
            rnd_q   <= '0;
            done_q  <= 1'b1;
          end else begin
            rnd_q <= rnd_q + CW'(1);
          end
        end
        default: state_q <= S_IDLE;
      endcase
      // The round index stays inside 1 .. NR while a block is processed.
      if (busy) begin
        assert (rnd_q != '0 && 32'(rnd_q) <= NR)
          else $error("sea_ctrl: round index %0d out of range", rnd_q);
      end
    end
  end

endmodule
