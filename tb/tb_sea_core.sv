// tb_sea_core: end-to-end test of the SEA_{n,b} core at its default size.
//
// The core is instantiated without parameter overrides (SEA_{48,8}, 51
// rounds). Random and fixed blocks are encrypted and decrypted under random
// and fixed keys; every result is compared with the reference model, and
// every cipher text is decrypted back to its plain text. Checked besides:
// the latency (done raised by the NR-th rising edge after the start edge), busy for
// exactly NR cycles, a start during a run being ignored, back-to-back blocks
// (a new start in the cycle done is high), and the key register holding the
// start key again after each run. The mechanisms the loop relies on are
// counted and each must occur: encryption and decryption runs, the middle
// and final exchanges of the key halves, the switch of the data round from
// KR to KL, the ignored start and the back-to-back start.
module tb_sea_core;
  import sea_ref_pkg::*;

  localparam int N  = 48;
  localparam int B  = 8;
  localparam int NR = sea_pkg::sea_rounds(N, B);

  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_mid_swap = 0, n_final_swap = 0, n_kl = 0;
  int n_ignored = 0, n_b2b = 0;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;

  logic         start = 0, decrypt = 0;
  logic [N-1:0] key_in = '0, data_in = '0, data_out;
  logic         busy, done;

  sea_core dut (
    .clk(clk), .rst_n(rst_n), .start(start), .decrypt(decrypt),
    .key_in(key_in), .data_in(data_in), .data_out(data_out),
    .busy(busy), .done(done));

  // Mechanism counters, sampled from the controller's decisions.
  always @(posedge clk) begin
    if (dut.u_ctrl.busy && dut.u_ctrl.key_swap &&  dut.u_ctrl.fk_en) n_mid_swap++;
    if (dut.u_ctrl.busy && dut.u_ctrl.key_swap && !dut.u_ctrl.fk_en) n_final_swap++;
    if (dut.u_ctrl.busy && dut.u_ctrl.use_kl) n_kl++;
  end

  task automatic expect_eq(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  // Run one block; start is driven from a negedge and sampled at the next
  // posedge; done must rise NR edges after that start edge. poke: try a second start in the middle of the run.
  task automatic run_block(logic [N-1:0] key, logic [N-1:0] din, bit dec,
                           bit poke, output logic [N-1:0] dout);
    int edges = 0, busy_cycles = 0;
    key_in = key; data_in = din; decrypt = dec; start = 1;
    @(posedge clk);
    #1 start = 0;
    data_in = ~din; key_in = ~key; decrypt = ~dec; // inputs are captured only at start
    while (!done) begin
      if (busy) busy_cycles++;
      if (poke && edges == 5) begin
        start = 1;
        @(posedge clk); edges++;
        #1 start = 0;
        n_ignored++;
        continue;
      end
      @(posedge clk); edges++;
      #1;
    end
    checks++;
    if (edges != NR || busy_cycles != NR) begin
      failures++;
      $display("FAIL latency: done after %0d edges, busy %0d cycles (NR=%0d)",
               edges, busy_cycles, NR);
    end
    expect_eq("key restored", {dut.kl_q, dut.kr_q}, key);
    dout = data_out;
    if (dec) n_dec++; else n_enc++;
  endtask

  task automatic one(logic [N-1:0] key, logic [N-1:0] pt, bit poke);
    logic [N-1:0] ct, back;
    run_block(key, pt, 1'b0, poke, ct);
    expect_eq("encrypt", ct, N'(ref_encrypt(256'(pt), 256'(key), N, B, NR)));
    // Back-to-back: start decryption in the cycle done is high.
    n_b2b++;
    run_block(key, ct, 1'b1, 1'b0, back);
    expect_eq("decrypt", back, N'(ref_decrypt(256'(ct), 256'(key), N, B, NR)));
    expect_eq("round trip", back, pt);
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Block taken from a published waveform of this design (key chosen here).
    one(48'h0123_4567_89ab, 48'b000110000001010000100000001100000010000000010000, 1'b1);
    one('0, '0, 1'b0);
    one('1, '1, 1'b0);
    for (int i = 0; i < 40; i++)
      one(N'(rand256()), N'(rand256()), i % 8 == 3);
    // Decrypting a random block must also match the reference.
    for (int i = 0; i < 5; i++) begin
      logic [N-1:0] k, c, p;
      k = N'(rand256()); c = N'(rand256());
      run_block(k, c, 1'b1, 1'b0, p);
      expect_eq("decrypt random", p, N'(ref_decrypt(256'(c), 256'(k), N, B, NR)));
      @(negedge clk);
    end

    $display("mechanisms: enc=%0d dec=%0d mid_swap=%0d final_swap=%0d kl_rounds=%0d ignored_start=%0d back_to_back=%0d",
             n_enc, n_dec, n_mid_swap, n_final_swap, n_kl, n_ignored, n_b2b);
    checks++; if (n_enc == 0)       begin failures++; $display("FAIL no encryption"); end
    checks++; if (n_dec == 0)       begin failures++; $display("FAIL no decryption"); end
    checks++; if (n_mid_swap != n_enc + n_dec)   begin failures++; $display("FAIL middle exchange count"); end
    checks++; if (n_final_swap != n_enc + n_dec) begin failures++; $display("FAIL final exchange count"); end
    checks++; if (n_kl == 0)        begin failures++; $display("FAIL never keyed by KL"); end
    checks++; if (n_ignored == 0)   begin failures++; $display("FAIL no ignored start"); end
    checks++; if (n_b2b == 0)       begin failures++; $display("FAIL no back-to-back start"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
