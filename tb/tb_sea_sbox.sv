// tb_sea_sbox: self-checking test of the bit-sliced S-box layer.
//
// First every 3-bit input value is applied at every bit position of every
// group (the output must match the table S = {0,5,6,7,4,3,1,2}), then random
// words are compared with the reference model. Sizes: 3 words of 8 bits and
// 6 words of 4 bits.
module tb_sea_sbox;
  import sea_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [23:0] x8, y8, x4, y4;

  sea_sbox #(.NW(3), .B(8)) dut8 (.x(x8), .y(y8));
  sea_sbox #(.NW(6), .B(4)) dut4 (.x(x4), .y(y4));

  task automatic check();
    #1;
    checks += 2;
    if (y8 !== 24'(ref_sbox(half_t'(x8), 48, 8))) begin
      failures++;
      $display("FAIL b=8 x=%h got=%h", x8, y8);
    end
    if (y4 !== 24'(ref_sbox(half_t'(x4), 48, 4))) begin
      failures++;
      $display("FAIL b=4 x=%h got=%h", x4, y4);
    end
  endtask

  initial begin
    // Table check: value v at bit position j of the single 8-bit group.
    for (int v = 0; v < 8; v++)
      for (int j = 0; j < 8; j++) begin
        logic [2:0] s;
        x8 = '0;
        x8[j] = v[0]; x8[8+j] = v[1]; x8[16+j] = v[2];
        x4 = '0;
        #1;
        s = {y8[16+j], y8[8+j], y8[j]};
        checks++;
        if (s !== SBOX[v]) begin
          failures++;
          $display("FAIL table v=%0d bit=%0d got=%0d", v, j, s);
        end
      end
    repeat (500) begin
      x8 = 24'($urandom()); x4 = 24'($urandom());
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
