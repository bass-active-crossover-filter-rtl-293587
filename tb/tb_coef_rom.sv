// tb_coef_rom -- self-checking test of the coefficient ROM.
// For every setting it checks properties any correct table must have:
// equal outer numerator taps (b0 = b2, zeros on the unit circle), stable
// complex pole pairs (0 < a2 < 1, a1*a1 < 4*a2), unity section gain at DC for
// low-pass and at fs/2 for high-pass (within 1e-3), a zero of the low-pass
// numerator at fs/2 or of the high-pass numerator at DC (within 1e-3 of the
// tap size), that freq = 3 repeats freq = 2, and that coef_bit is the
// selected bit of the word.
module tb_coef_rom;
  import bxf_ref_pkg::*;
  logic        high_pass;
  logic [1:0]  freq;
  logic [4:0]  index, bit_sel;
  logic [19:0] word, w3;
  logic        coef_bit;
  int checks = 0, failures = 0;

  coef_rom dut (.high_pass, .freq, .index, .bit_sel, .word, .coef_bit);

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (hp=%0d freq=%0d)", what, high_pass, freq);
    end
  endtask

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    for (int hp = 0; hp < 2; hp++) begin
      for (int f = 0; f < 3; f++) begin
        real c [20];
        high_pass = 1'(hp); freq = 2'(f);
        for (int k = 0; k < 20; k++) begin
          index = 5'(k);
          bit_sel = 5'($urandom_range(0, 19));
          #1;
          c[k] = coef_real(word);
          expect_true(coef_bit == word[bit_sel], "coef_bit");
          if (f == 2) begin
            logic [19:0] w2v;
            w2v = word;
            freq = 2'd3; #1; w3 = word; freq = 2'(f); #1;
            expect_true(w3 == w2v, "freq 3 equals freq 2");
          end
        end
        for (int s = 0; s < 4; s++) begin
          real a1, a2, b2, b1, b0, z, gain, num0;
          a1 = -c[5*s]; a2 = -c[5*s+1]; b2 = c[5*s+2]; b1 = c[5*s+3]; b0 = c[5*s+4];
          z = hp ? -1.0 : 1.0;
          gain = fabs((b0 + b1 / z + b2) / (1.0 + a1 / z + a2));
          num0 = fabs(b0 - b1 / z + b2);     // numerator at the opposite band edge
          expect_true(b0 == b2, "b0 == b2");
          expect_true(a2 > 0.0 && a2 < 1.0 && a1 * a1 < 4.0 * a2, "stable complex poles");
          expect_true(fabs(gain - 1.0) < 1e-3, $sformatf("unity section gain (%f)", gain));
          expect_true(num0 < 1e-3 * b0 + 1e-5 || !hp, "high-pass zero near DC");
          expect_true(b0 > 0.0, "positive b0");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
