// tb_sea_core_sizes: the same core at several sizes of text, key and word.
//
// The cipher is defined for any n that is a multiple of 6b; this test builds
// the core as SEA_{24,4}, SEA_{36,6}, SEA_{48,8}, SEA_{96,8}, SEA_{96,16}
// and SEA_{144,8}, each with its derived round count, and checks encryption
// against the reference model and the decryption round trip for each.
module tb_sea_core_sizes;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;
  logic go = 0;

  localparam int K = 6;
  logic fin [K];
  int   chk [K];
  int   fl  [K];

  sea_core_checker #(.N(24),  .B(4),  .NBLK(12)) c0 (.clk, .rst_n, .go, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  sea_core_checker #(.N(36),  .B(6),  .NBLK(12)) c1 (.clk, .rst_n, .go, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]));
  sea_core_checker #(.N(48),  .B(8),  .NBLK(12)) c2 (.clk, .rst_n, .go, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]));
  sea_core_checker #(.N(96),  .B(8),  .NBLK(12)) c3 (.clk, .rst_n, .go, .finished(fin[3]), .checks(chk[3]), .failures(fl[3]));
  sea_core_checker #(.N(96),  .B(16), .NBLK(12)) c4 (.clk, .rst_n, .go, .finished(fin[4]), .checks(chk[4]), .failures(fl[4]));
  sea_core_checker #(.N(144), .B(8),  .NBLK(12)) c5 (.clk, .rst_n, .go, .finished(fin[5]), .checks(chk[5]), .failures(fl[5]));

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    go = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    for (int i = 0; i < K; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
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
