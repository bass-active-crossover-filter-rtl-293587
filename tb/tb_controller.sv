// tb_controller -- self-checking test of the control unit.
// The controller runs with the real state ROM and coefficient ROM; the
// datapath's two status bits are driven at random.  The testbench checks the
// clear sequence after reset (nine writes to addresses 0..8), and for each
// word strobe: one input load, busy for exactly 437 cycles, 20 MACs of 20
// cycles whose multiplier bits are the coefficient bits 0..18 of the
// coefficients 0..19 in order, the product sign in the last step, and the
// SRAM addresses of reads and writes (section s uses words 2s, 2s+1 and 8).
module tb_controller;
  import bxf_pkg::*;
  logic           clk = 0, rst;
  logic           word_en, s_sign, a_sign;
  logic [PCW-1:0] pc;
  uinst_t         uinst;
  logic [4:0]     coef_index, coef_bit_sel;
  logic [CW-1:0]  coef_word;
  logic           coef_bit, busy;
  dp_ctrl_t       ctrl;
  logic           high_pass;
  logic [1:0]     freq;
  // independent lookup of the expected coefficient words
  logic [4:0]     ref_index;
  logic [CW-1:0]  ref_word;
  logic           ref_bit_unused;
  int checks = 0, failures = 0;

  state_rom u_srom (.pc, .uinst);
  coef_rom  u_crom (.high_pass, .freq, .index(coef_index), .bit_sel(coef_bit_sel),
                    .word(coef_word), .coef_bit);
  coef_rom  u_rrom (.high_pass, .freq, .index(ref_index), .bit_sel(5'd0),
                    .word(ref_word), .coef_bit(ref_bit_unused));
  controller dut (.clk, .rst, .word_en, .s_sign, .a_sign, .pc, .uinst,
                  .coef_index, .coef_bit_sel, .coef_bit, .coef_sign(coef_word[CW-1]),
                  .ctrl, .busy);

  always #5 clk = ~clk;

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Monitor of one sample's worth of control.
  int   cyc_busy, n_load, mac_step, mac_no, n_wr, n_rd;
  bit   in_run;
  always @(posedge clk) if (!rst) begin
    s_sign <= 1'($urandom);
    a_sign <= 1'($urandom);
    if (in_run) begin
      if (busy) cyc_busy++;
      if (ctrl.t2_sel) n_load++;
      // a MAC step is any cycle using the multiplier-bit lines
      if (ctrl.b1_sel || (mac_step == 0 && !ctrl.r_sel && !ctrl.sram_wen && !ctrl.t2_sel
                          && !ctrl.b2_sel && !ctrl.a1_sel && dut.state == dut.S_RUN
                          && uinst.op == OP_MAC)) begin
        ref_index = 5'(mac_no);
        #0;
        expect_true(ctrl.a2_sel == ref_word[mac_step], "multiplier bit");
        expect_true(mac_step == 0 ? !ctrl.b1_sel : ctrl.b1_sel, "shift on steps 1..18");
        mac_step++;
      end else if (ctrl.t1_sel && ctrl.a1_sel) begin
        ref_index = 5'(mac_no);
        #0;
        expect_true(mac_step == 19, "MAC has 19 multiply steps before the sign step");
        expect_true(ctrl.a2_sel == (ref_word[19] ^ s_sign) && ctrl.cin == ctrl.a2_sel, "product sign");
        expect_true(ctrl.b2_sel && !ctrl.b1_sel, "accumulate into dff_t");
        mac_step = 0;
        mac_no++;
      end
      if (ctrl.sram_wen) begin
        n_wr++;
        expect_true(ctrl.sram_addr == SAW'(8) || ctrl.sram_addr[3:1] == 3'(dut.row),
                    "write address in section");
      end
      if (ctrl.r_sel) begin
        n_rd++;
        expect_true(ctrl.sram_addr == SAW'(8) || ctrl.sram_addr[3:1] == 3'(dut.row),
                    "read address in section");
      end
    end
  end

  initial begin
    int n_clear;
    rst = 1; word_en = 0; high_pass = 0; freq = 0; in_run = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // clear sequence
    n_clear = 0;
    for (int i = 0; i < 20; i++) begin
      if (ctrl.sram_wen) begin
        expect_true(ctrl.sram_addr == SAW'(n_clear) && !ctrl.w_sel, "clear write");
        n_clear++;
      end
      @(negedge clk);
    end
    expect_true(n_clear == 9 && !busy, "nine clear writes, then idle");
    for (int r = 0; r < 12; r++) begin
      high_pass = 1'(r % 2);
      freq = 2'(r / 2 % 4);
      cyc_busy = 0; n_load = 0; mac_step = 0; mac_no = 0; n_wr = 0; n_rd = 0;
      @(negedge clk) word_en = 1;
      in_run = 1;
      @(negedge clk) word_en = 0;
      while (busy) @(negedge clk);
      in_run = 0;
      expect_true(cyc_busy == 437, $sformatf("busy for 437 cycles (%0d)", cyc_busy));
      expect_true(n_load == 1, "one input load");
      expect_true(mac_no == 20, $sformatf("20 MACs (%0d)", mac_no));
      expect_true(n_wr == 12 && n_rd == 16, $sformatf("12 writes, 16 reads (%0d, %0d)", n_wr, n_rd));
      repeat ($urandom_range(1, 30)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
