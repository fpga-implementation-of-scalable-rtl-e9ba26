// tb_sea_ctrl: self-checking test of the round controller.
//
// Two instances (NR = 51 with 8-bit constants, NR = 9 with 4-bit constants)
// are started; in every round cycle the constant, fk_en, key_swap and use_kl
// are compared with the schedule worked out here from the cipher's key
// scheduling (constants 1..h then h..1, exchanges when K_h is written and
// after the last round, KR for rounds 1..h+1, KL after). The test also
// checks that busy lasts exactly NR cycles, that done pulses once, raised by the NR-th edge
// after the start edge, and that a start during a run is ignored.
module tb_sea_ctrl;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;

  logic       start_a, load_a, ren_a, busy_a, done_a, fk_a, sw_a, kl_a;
  logic [7:0] c_a;
  logic       start_b, load_b, ren_b, busy_b, done_b, fk_b, sw_b, kl_b;
  logic [3:0] c_b;

  sea_ctrl #(.NR(51), .B(8)) dut_a (
    .clk(clk), .rst_n(rst_n), .start(start_a), .load(load_a), .round_en(ren_a),
    .busy(busy_a), .done(done_a), .c_const(c_a), .fk_en(fk_a), .key_swap(sw_a),
    .use_kl(kl_a));
  sea_ctrl #(.NR(9), .B(4)) dut_b (
    .clk(clk), .rst_n(rst_n), .start(start_b), .load(load_b), .round_en(ren_b),
    .busy(busy_b), .done(done_b), .c_const(c_b), .fk_en(fk_b), .key_swap(sw_b),
    .use_kl(kl_b));

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d at %0t", what, got, exp, $time);
    end
  endtask

  // Run instance a (sel = 0) or b (sel = 1) once and check its schedule.
  task automatic run(bit sel, int nr, bit poke_start);
    int h = nr / 2;
    @(negedge clk);
    if (!sel) start_a = 1; else start_b = 1;
    #1;
    expect_eq("load", sel ? int'(load_b) : int'(load_a), 1);
    @(negedge clk);
    start_a = 0; start_b = 0;
    for (int i = 1; i <= nr; i++) begin
      int c = (i <= h) ? i : nr - i;
      if (sel) c = c % 16;
      expect_eq("busy", sel ? int'(busy_b) : int'(busy_a), 1);
      expect_eq("round_en", sel ? int'(ren_b) : int'(ren_a), 1);
      expect_eq("c_const", sel ? int'(c_b) : int'(c_a), c);
      expect_eq("fk_en", sel ? int'(fk_b) : int'(fk_a), int'(i < nr));
      expect_eq("key_swap", sel ? int'(sw_b) : int'(sw_a), int'(i == h || i == nr));
      expect_eq("use_kl", sel ? int'(kl_b) : int'(kl_a), int'(i > h + 1));
      expect_eq("done", sel ? int'(done_b) : int'(done_a), 0);
      if (poke_start && i == 3) begin
        if (!sel) start_a = 1; else start_b = 1;
        #1;
        expect_eq("load while busy", sel ? int'(load_b) : int'(load_a), 0);
      end
      @(negedge clk);
      start_a = 0; start_b = 0;
    end
    expect_eq("done pulse", sel ? int'(done_b) : int'(done_a), 1);
    expect_eq("idle after run", sel ? int'(busy_b) : int'(busy_a), 0);
    @(negedge clk);
    expect_eq("done one cycle", sel ? int'(done_b) : int'(done_a), 0);
    expect_eq("stays idle", sel ? int'(busy_b) : int'(busy_a), 0);
  endtask

  initial begin
    start_a = 0; start_b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_eq("idle after reset", int'(busy_a), 0);
    run(1'b0, 51, 1'b0);
    run(1'b1, 9, 1'b1);
    run(1'b0, 51, 1'b1);
    run(1'b1, 9, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
