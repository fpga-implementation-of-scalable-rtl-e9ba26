// sea_core_checker: drives one sea_core of a given size through a set of
// random blocks and checks it against the reference model.
//
// When `go` rises it encrypts NBLK random blocks under random keys, compares
// each cipher text with the reference, decrypts it and compares the result
// with the plain text; it also checks that each run takes NR cycles. It then
// raises `finished` and holds its counts of checks and failures.
module sea_core_checker #(
  parameter int N    = 48,
  parameter int B    = 8,
  parameter int NBLK = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures
);
  import sea_ref_pkg::*;

  localparam int NR = sea_pkg::sea_rounds(N, B);

  logic         start = 0, decrypt = 0;
  logic [N-1:0] key_in = '0, data_in = '0, data_out;
  logic         busy, done;

  sea_core #(.N(N), .B(B)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .decrypt(decrypt),
    .key_in(key_in), .data_in(data_in), .data_out(data_out),
    .busy(busy), .done(done));

  task automatic run_block(logic [N-1:0] key, logic [N-1:0] din, bit dec,
                           output logic [N-1:0] dout);
    int edges = 0;
    @(negedge clk);
    key_in = key; data_in = din; decrypt = dec; start = 1;
    @(posedge clk);
    #1 start = 0;
    while (!done) begin
      @(posedge clk); edges++;
      #1;
    end
    checks++;
    if (edges != NR) begin
      failures++;
      $display("FAIL n=%0d b=%0d latency %0d, expected %0d", N, B, edges, NR);
    end
    dout = data_out;
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    wait (go);
    for (int i = 0; i < NBLK; i++) begin
      logic [N-1:0] k, p, c, q;
      k = N'(rand256()); p = N'(rand256());
      run_block(k, p, 1'b0, c);
      checks++;
      if (c !== N'(ref_encrypt(256'(p), 256'(k), N, B, NR))) begin
        failures++;
        $display("FAIL n=%0d b=%0d encrypt k=%h p=%h got=%h", N, B, k, p, c);
      end
      run_block(k, c, 1'b1, q);
      checks++;
      if (q !== p) begin
        failures++;
        $display("FAIL n=%0d b=%0d round trip p=%h got=%h", N, B, p, q);
      end
    end
    finished = 1;
  end
endmodule
