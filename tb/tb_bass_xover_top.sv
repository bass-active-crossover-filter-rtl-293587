// tb_bass_xover_top -- end-to-end test of the filter core at its default
// configuration.
//
// Streams 400 serial words through the chip: 16 data bits, LSB first, at the
// end of each 64-bit frame (8 system clocks per bit, so 512 clocks per
// sample), with word_clk high on the last bit.  The input mixes a slow square
// wave, a component at fs/2 and noise; the last 80 words are full-scale steps.
// Every 40 frames the setting changes (low/high-pass, freq codes 0..3); in
// frame 200 a reset arrives while a sample is being computed.  Each output word
// is compared bit for bit with the integer reference model of bxf_ref_pkg
// (output word read in frame f+1 = result of the input of frame f-1).
// Also checked: every sample takes 437 clock cycles and 400 of them are
// multiply-accumulate cycles.  Counted, and required at least once: each
// setting, a setting change, a negative product, a negative-to-sign-magnitude
// conversion, the clear sequence after a second reset, and a full-scale input.
// Also checked functionally: the fs/2 component of the input is removed in
// low-pass mode and passed in high-pass mode.
module tb_bass_xover_top;
  import bxf_pkg::*;
  import bxf_ref_pkg::*;

  localparam int NFRAMES    = 400;
  localparam int FRAME_BITS = 64;
  localparam int HALF       = 4;     // system clocks per half bit period
  localparam int RESET_FRAME = 200;

  logic       clk = 0, rst;
  logic       high_pass;
  logic [1:0] freq;
  logic       bit_clk, word_clk, x_bit, y_bit;

  bass_xover_top dut (.clk, .rst, .high_pass, .freq, .bit_clk, .word_clk, .x_bit, .y_bit);

  always #5 clk = ~clk;

  // reference coefficient lookup
  logic [4:0]  ref_index;
  logic [19:0] ref_word;
  logic        ref_bit_unused;
  coef_rom u_ref_rom (.high_pass, .freq, .index(ref_index), .bit_sel(5'd0),
                      .word(ref_word), .coef_bit(ref_bit_unused));

  int checks = 0, failures = 0;
  int n_setting [8];
  int n_switch = 0, n_neg_prod = 0, n_neg_sm = 0, n_clear = 0, n_fullscale = 0;
  int n_samples = 0, n_lp_quiet = 0, n_hp_quiet = 0;

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---- cycle accounting and mechanism monitors --------------------------
  int busy_len = 0, mac_cyc = 0;
  logic busy_q = 0;
  always @(posedge clk) begin
    if (rst) begin
      busy_len = 0; mac_cyc = 0; busy_q = 0;
    end else begin
      if (dut.u_ctrl.state == dut.u_ctrl.S_CLEAR && dut.u_ctrl.loop == '0) n_clear++;
      if (dut.u_ctrl.state == dut.u_ctrl.S_RUN) begin
        if (dut.u_ctrl.uinst.op == OP_MAC) mac_cyc++;
        if (dut.u_ctrl.uinst.op == OP_MAC && dut.u_ctrl.mac_last && dut.u_ctrl.psign) n_neg_prod++;
        if (dut.u_ctrl.uinst.op == OP_SM && dut.u_dp.a_sign) n_neg_sm++;
      end
      if (dut.u_ctrl.busy && dut.u_ctrl.state != dut.u_ctrl.S_CLEAR) busy_len++;
      if (busy_q && !dut.u_ctrl.busy && busy_len > 0) begin
        n_samples++;
        expect_true(busy_len == 437, $sformatf("437 cycles per sample (%0d)", busy_len));
        expect_true(mac_cyc == 400, $sformatf("400 MAC cycles per sample (%0d)", mac_cyc));
        busy_len = 0; mac_cyc = 0;
      end
      busy_q = dut.u_ctrl.busy;
    end
  end

  // ---- stimulus and reference --------------------------------------------
  logic [19:0]  coef [20];
  fstate_t      st;
  logic [15:0]  xs [NFRAMES];
  logic [31:0]  yprev;
  logic [15:0]  exp_load [NFRAMES];
  logic [15:0]  got;
  logic [15:0]  outs [NFRAMES];
  int           setting_of [NFRAMES];

  function automatic logic [15:0] gen_x(input int f);
    int v;
    if (f >= NFRAMES - 80) return ((f / 20) % 2 == 0) ? 16'sd32000 : -16'sd32000;
    v = (((f / 16) % 2) == 0) ? 6000 : -6000;     // square wave, period 32
    v += (f % 2 == 0) ? 3000 : -3000;              // fs/2 component
    v += $urandom_range(0, 800) - 400;             // noise
    return 16'(v);
  endfunction

  task automatic load_coef();
    for (int k = 0; k < 20; k++) begin
      ref_index = 5'(k);
      #1;
      coef[k] = ref_word;
    end
  endtask

  task automatic clear_state();
    for (int s = 0; s < 4; s++) begin
      st.w1[s] = 32'd0;
      st.w2[s] = 32'd0;
    end
  endtask

  initial begin
    int set_now, set_prev;
    rst = 1; bit_clk = 0; word_clk = 0; x_bit = 0; high_pass = 0; freq = 0;
    for (int f = 0; f < NFRAMES; f++) xs[f] = gen_x(f);
    clear_state();
    yprev = 0;
    set_prev = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      bit reset_here;
      reset_here = (f == RESET_FRAME);
      for (int j = 0; j < FRAME_BITS; j++) begin
        @(negedge clk);
        bit_clk  = 0;
        x_bit    = (j >= FRAME_BITS - 16) ? xs[f][j - (FRAME_BITS - 16)] : 1'($urandom);
        word_clk = (j == FRAME_BITS - 1);
        if (j == 60) begin
          set_now = (f >= NFRAMES - 80) ? 0 : (f / 40) % 8;
          high_pass = 1'(set_now % 2);
          freq      = 2'(set_now / 2);
          if (set_now != set_prev) n_switch++;
          set_prev = set_now;
          setting_of[f] = set_now;
          n_setting[set_now]++;
        end
        if (j == 40 && reset_here) begin
          rst = 1;
          repeat (4) @(negedge clk);
          rst = 0;
        end
        repeat (HALF) @(negedge clk);
        if (j < 16) got[j] = y_bit;
        bit_clk = 1;
        repeat (HALF - 1) @(negedge clk);
      end
      // word edge of frame f: output register takes y[f-1] (or 0 after reset)
      if (reset_here) begin
        clear_state();
        yprev = 0;
      end
      exp_load[f] = yprev[15:0];
      load_coef();
      if (xs[f] == 16'sd32000 || xs[f] == -16'sd32000) n_fullscale++;
      yprev = filter_step(st, coef, xs[f]);
      // the word read during frame f is the one loaded at the end of frame f-1
      if (f >= 1) begin
        outs[f - 1] = got;
        expect_true(got == exp_load[f - 1],
                    $sformatf("output word of frame %0d: got %h want %h", f - 1, got, exp_load[f - 1]));
      end
    end
    // functional sanity on settled output (outs[k] is the result for input
    // k-1): the fs/2 component (alternating sum over 16 words) is removed by
    // the low-pass and passed by the high-pass
    for (int f = 40; f < NFRAMES - 80; f += 40) begin
      int alt;
      alt = 0;
      for (int k = f + 4; k < f + 36; k++) begin
        if (k >= f + 20) alt += (k % 2 == 0) ? int'($signed(outs[k])) : -int'($signed(outs[k]));
      end
      if (f == RESET_FRAME || f + 1 == RESET_FRAME) continue;
      if (f / 40 % 2 == 0) begin
        n_lp_quiet++;
        expect_true(alt < 1600 && alt > -1600, $sformatf("low-pass removes fs/2 (frame %0d, %0d)", f, alt));
      end else begin
        n_hp_quiet++;
        expect_true(alt > 30000 || alt < -30000, $sformatf("high-pass passes fs/2 (frame %0d, %0d)", f, alt));
      end
    end
    // every mechanism must have happened
    for (int s = 0; s < 8; s++) expect_true(n_setting[s] > 0, $sformatf("setting %0d used", s));
    expect_true(n_switch > 0,    "setting change");
    expect_true(n_neg_prod > 0,  "negative product");
    expect_true(n_neg_sm > 0,    "negative sign-magnitude conversion");
    expect_true(n_clear >= 2,    "clear sequence after reset");
    expect_true(n_fullscale > 0, "full-scale input");
    expect_true(n_lp_quiet > 0 && n_hp_quiet > 0, "low- and high-pass behaviour checked");
    expect_true(n_samples > NFRAMES - 10, $sformatf("samples computed (%0d)", n_samples));
    $display("mechanisms: switches=%0d neg_products=%0d neg_conversions=%0d clears=%0d fullscale=%0d samples=%0d",
             n_switch, n_neg_prod, n_neg_sm, n_clear, n_fullscale, n_samples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFRAMES * FRAME_BITS * 2 * HALF + 10000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
