// tb_sea_word_add: self-checking test of the word-wise modular adder.
//
// Two instances (3 words of 8 bits, 6 words of 4 bits) get random operands
// plus carry-heavy corner cases; each sum is compared with the reference
// model's word-by-word addition, which must drop every carry out of a word.
module tb_sea_word_add;
  import sea_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [23:0] a8, b8, s8;
  logic [23:0] a4, b4, s4;

  sea_word_add #(.NW(3), .B(8)) dut8 (.a(a8), .b_in(b8), .sum(s8));
  sea_word_add #(.NW(6), .B(4)) dut4 (.a(a4), .b_in(b4), .sum(s4));

  task automatic check();
    #1;
    checks += 2;
    if (s8 !== 24'(ref_add(half_t'(a8), half_t'(b8), 48, 8))) begin
      failures++;
      $display("FAIL b=8 a=%h b=%h got=%h", a8, b8, s8);
    end
    if (s4 !== 24'(ref_add(half_t'(a4), half_t'(b4), 48, 4))) begin
      failures++;
      $display("FAIL b=4 a=%h b=%h got=%h", a4, b4, s4);
    end
  endtask

  initial begin
    a8 = '1; b8 = 24'h010101; a4 = '1; b4 = 24'h111111; check();
    a8 = 24'h80ff7f; b8 = 24'h80017f; a4 = 24'h8f7f8f; b4 = 24'h818f81; check();
    repeat (500) begin
      a8 = 24'($urandom()); b8 = 24'($urandom());
      a4 = 24'($urandom()); b4 = 24'($urandom());
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
