// tb_sea_key_round: self-checking test of the key-schedule round.
//
// Random key halves and constants are applied with every combination of
// fk_en and swap; the result is compared with the reference model's FK
// followed (or not) by an exchange of the halves. A second instance, fed
// with the exchanged output of FK and the same constant, must return the
// exchanged input: the property that lets the second half of the key
// schedule walk back to the start key.
module tb_sea_key_round;
  import sea_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [23:0] kl, kr, kln, krn, kl2, kr2;
  logic [7:0]  c;
  logic        fk_en, swap;

  sea_key_round #(.N(48), .B(8)) dut (
    .kl(kl), .kr(kr), .c(c), .fk_en(fk_en), .swap(swap),
    .kl_next(kln), .kr_next(krn));
  sea_key_round #(.N(48), .B(8)) dut_back (
    .kl(krn), .kr(kln), .c(c), .fk_en(1'b1), .swap(1'b0),
    .kl_next(kl2), .kr_next(kr2));

  initial begin
    repeat (400) begin
      half_t el, er, t;
      kl = 24'($urandom()); kr = 24'($urandom());
      c = 8'($urandom_range(0, 40));
      fk_en = 1'($urandom()); swap = 1'($urandom());
      #1;
      el = half_t'(kl); er = half_t'(kr);
      if (fk_en) ref_fk(el, er, int'(c), 48, 8);
      if (swap) begin t = el; el = er; er = t; end
      checks++;
      if ({kln, krn} !== {24'(el), 24'(er)}) begin
        failures++;
        $display("FAIL fk=%0d sw=%0d kl=%h kr=%h c=%0d got=%h_%h exp=%h_%h",
                 fk_en, swap, kl, kr, c, kln, krn, 24'(el), 24'(er));
      end
      if (fk_en && !swap) begin
        checks++;
        if ({kl2, kr2} !== {kr, kl}) begin
          failures++;
          $display("FAIL walk-back kl=%h kr=%h c=%0d", kl, kr, c);
        end
      end
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
