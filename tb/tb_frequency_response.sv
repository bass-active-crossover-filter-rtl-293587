// tb_frequency_response -- measures the filter's gain on sine waves.
//
// For each cut-off (80, 120, 160 Hz) the core is reset and fed the same
// input twice, once as low-pass and once as high-pass: the sum of three
// sines of amplitude 8000 at fc/2, fc and 4*fc (48 kHz sample rate assumed),
// streamed serially at 512 system clocks per sample.  After settling, the
// amplitude of each tone in the output is measured by
// correlation over one period of the fc/2 tone (which holds whole periods of
// all three).  Settling lasts 6000 samples at 80 Hz and scales with 1/fc:
// the slowest poles need that long for the start-up transient to fall 80 dB.
// The same is done for the sum of the low-pass and high-pass outputs, as a
// crossover would add them acoustically.
// Expected (from the filter specification): pass-band gain 0 +/- 0.5 dB,
// -6 +/- 1 dB at the crossover frequency, at least 70 dB attenuation two
// octaves into the stop-band (the design reaches 69-80 dB after rounding to
// 20-bit coefficients; 16-bit output words limit the measurement), and a
// combined low+high-pass gain within +/- 0.6 dB.
module tb_frequency_response;
  localparam int FRAME_BITS = 64;
  localparam int HALF       = 4;
  localparam real AMP       = 8000.0;
  localparam real PI        = 3.14159265358979;
  localparam int MAXN       = 6000 + 1200 + 4;

  logic       clk = 0, rst;
  logic       high_pass;
  logic [1:0] freq;
  logic       bit_clk, word_clk, x_bit, y_bit;

  bass_xover_top dut (.clk, .rst, .high_pass, .freq, .bit_clk, .word_clk, .x_bit, .y_bit);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic signed [15:0] ylp [MAXN];
  logic signed [15:0] yhp [MAXN];

  task automatic expect_range(input real v, input real lo, input real hi, input string what);
    checks++;
    if (!(v >= lo && v <= hi)) begin
      failures++;
      $display("FAIL %s: %.2f dB not in [%.1f, %.1f]", what, v, lo, hi);
    end else begin
      $display("ok   %s: %.2f dB", what, v);
    end
  endtask

  function automatic logic signed [15:0] stim(input int n, input real fc);
    real v;
    v = AMP * ($sin(2.0 * PI * (fc / 2.0) * n / 48000.0) + $sin(2.0 * PI * fc * n / 48000.0)
               + $sin(2.0 * PI * (4.0 * fc) * n / 48000.0));
    return 16'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
  endfunction

  // stream nsamp input words; word read in frame f is the result for input f-2
  task automatic run(input bit hp, input logic [1:0] fsel, input real fc, input int nsamp,
                     output logic signed [15:0] y [MAXN]);
    logic [15:0] got, xw;
    @(negedge clk);
    rst = 1; high_pass = hp; freq = fsel;
    repeat (20) @(negedge clk);
    rst = 0;
    repeat (20) @(negedge clk);
    for (int f = 0; f < nsamp + 2; f++) begin
      xw = stim(f, fc);
      for (int j = 0; j < FRAME_BITS; j++) begin
        @(negedge clk);
        bit_clk  = 0;
        x_bit    = (j >= FRAME_BITS - 16) ? xw[j - (FRAME_BITS - 16)] : 1'b0;
        word_clk = (j == FRAME_BITS - 1);
        repeat (HALF) @(negedge clk);
        if (j < 16) got[j] = y_bit;
        bit_clk = 1;
        repeat (HALF - 1) @(negedge clk);
      end
      if (f >= 2) y[f - 2] = got;
    end
  endtask

  // gain in dB of the tone at ftone, over samples [settle, settle+m)
  function automatic real gain_db(input logic signed [15:0] a [MAXN], input logic signed [15:0] b [MAXN],
                                  input bit use_b, input real ftone, input int settle, input int m);
    real s, c, v, amp;
    s = 0.0; c = 0.0;
    for (int n = settle; n < settle + m; n++) begin
      v = real'(a[n]) + (use_b ? real'(b[n]) : 0.0);
      s += v * $sin(2.0 * PI * ftone * n / 48000.0);
      c += v * $cos(2.0 * PI * ftone * n / 48000.0);
    end
    amp = 2.0 / m * $sqrt(s * s + c * c);
    return 20.0 * $log10(amp / AMP + 1e-12);
  endfunction

  initial begin
    real fcs [3];
    fcs[0] = 80.0; fcs[1] = 120.0; fcs[2] = 160.0;
    rst = 1; bit_clk = 0; word_clk = 0; x_bit = 0; high_pass = 0; freq = 0;
    for (int i = 0; i < 3; i++) begin
      real fc;
      int  m, st;
      fc = fcs[i];
      m  = $rtoi(48000.0 / (fc / 2.0) + 0.5);
      st = $rtoi(6000.0 * 80.0 / fc);
      run(1'b0, 2'(i), fc, st + m, ylp);
      run(1'b1, 2'(i), fc, st + m, yhp);
      expect_range(gain_db(ylp, yhp, 0, fc / 2.0, st, m), -0.5, 0.5,   $sformatf("LP %0.0f Hz at fc/2", fc));
      expect_range(gain_db(ylp, yhp, 0, fc, st,       m), -7.0, -5.0,  $sformatf("LP %0.0f Hz at fc", fc));
      expect_range(gain_db(ylp, yhp, 0, 4.0 * fc, st, m), -200.0, -70.0, $sformatf("LP %0.0f Hz at 4fc", fc));
      expect_range(gain_db(yhp, ylp, 0, fc / 2.0, st, m), -200.0, -70.0, $sformatf("HP %0.0f Hz at fc/2", fc));
      expect_range(gain_db(yhp, ylp, 0, fc, st,       m), -7.0, -5.0,  $sformatf("HP %0.0f Hz at fc", fc));
      expect_range(gain_db(yhp, ylp, 0, 4.0 * fc, st, m), -0.5, 0.5,   $sformatf("HP %0.0f Hz at 4fc", fc));
      expect_range(gain_db(ylp, yhp, 1, fc / 2.0, st, m), -0.6, 0.6,   $sformatf("LP+HP %0.0f Hz at fc/2", fc));
      expect_range(gain_db(ylp, yhp, 1, fc, st,       m), -0.6, 0.6,   $sformatf("LP+HP %0.0f Hz at fc", fc));
      expect_range(gain_db(ylp, yhp, 1, 4.0 * fc, st, m), -0.6, 0.6,   $sformatf("LP+HP %0.0f Hz at 4fc", fc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * (MAXN + 10) * FRAME_BITS * 2 * HALF + 100000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
