// tb_sea_data_round: self-checking test of the data round (FE and FD).
//
// Random halves and round keys are applied in both modes and compared with
// the reference model's FE and FD. A second instance, wired to the outputs
// of the first with the halves exchanged, runs FD after FE: it must give the
// original halves back (exchanged), which checks that the two modes invert
// each other. Sizes: SEA_{48,8} and SEA_{96,8}.
module tb_sea_data_round;
  import sea_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [23:0] l, r, k, ln, rn, l2, r2;
  logic        dec;
  logic [47:0] bl, br, bk, bln, brn;
  logic        bdec;

  sea_data_round #(.N(48), .B(8)) dut (
    .l(l), .r(r), .k(k), .decrypt(dec), .l_next(ln), .r_next(rn));
  // FD applied to the exchanged output of dut, with the same key.
  sea_data_round #(.N(48), .B(8)) dut_inv (
    .l(rn), .r(ln), .k(k), .decrypt(1'b1), .l_next(l2), .r_next(r2));
  sea_data_round #(.N(96), .B(8)) dut96 (
    .l(bl), .r(br), .k(bk), .decrypt(bdec), .l_next(bln), .r_next(brn));

  initial begin
    repeat (400) begin
      half_t el, er, fl, fr;
      l = 24'($urandom()); r = 24'($urandom()); k = 24'($urandom());
      dec = 1'($urandom());
      bl = {16'($urandom()), 32'($urandom())};
      br = {16'($urandom()), 32'($urandom())};
      bk = {16'($urandom()), 32'($urandom())};
      bdec = 1'($urandom());
      #1;
      el = half_t'(l); er = half_t'(r);
      if (dec) ref_fd(el, er, half_t'(k), 48, 8);
      else     ref_fe(el, er, half_t'(k), 48, 8);
      checks++;
      if ({ln, rn} !== {24'(el), 24'(er)}) begin
        failures++;
        $display("FAIL n=48 dec=%0d l=%h r=%h k=%h got=%h_%h exp=%h_%h",
                 dec, l, r, k, ln, rn, 24'(el), 24'(er));
      end
      if (!dec) begin
        checks++;
        if ({l2, r2} !== {r, l}) begin
          failures++;
          $display("FAIL FD(FE) l=%h r=%h k=%h got=%h_%h", l, r, k, l2, r2);
        end
      end
      fl = half_t'(bl); fr = half_t'(br);
      if (bdec) ref_fd(fl, fr, half_t'(bk), 96, 8);
      else      ref_fe(fl, fr, half_t'(bk), 96, 8);
      checks++;
      if ({bln, brn} !== {48'(fl), 48'(fr)}) begin
        failures++;
        $display("FAIL n=96 dec=%0d", bdec);
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
