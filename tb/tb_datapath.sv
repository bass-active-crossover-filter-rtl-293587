// tb_datapath -- self-checking test of the datapath, driven directly.
// The testbench plays the controller: it shifts a 16-bit word in serially,
// loads it into dff_t, runs serial multiply-accumulates with random
// sign-magnitude operands held in the SRAM and random coefficients (20
// cycles each, select lines set per step as the MAC needs), converts the
// result to sign-magnitude and writes it back, and shifts dff_t out serially.
// Every result is compared with the integer reference of bxf_ref_pkg.
module tb_datapath;
  import bxf_pkg::*;
  import bxf_ref_pkg::*;
  logic     clk = 0, rst;
  dp_ctrl_t ctrl;
  logic     bit_en, word_en, x_bit, y_bit, s_sign, a_sign;
  int checks = 0, failures = 0;
  int n_neg_prod = 0, n_neg_sm = 0;

  datapath dut (.clk, .rst, .ctrl, .bit_en, .word_en, .x_bit, .y_bit, .s_sign, .a_sign);

  always #5 clk = ~clk;

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  task automatic step(input dp_ctrl_t c);
    @(negedge clk) ctrl = c;
    @(posedge clk);
    #1 ctrl = '0;
  endtask

  // serial word in (LSB first); the last bit carries the word strobe, which
  // also loads the output register from dff_t
  task automatic shift_word(input logic [15:0] x);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      bit_en = 1; x_bit = x[i]; word_en = (i == 15);
      @(negedge clk);
      bit_en = 0; word_en = 0;
    end
  endtask

  task automatic rd(input int a);
    dp_ctrl_t c;
    c = '0; c.r_sel = 1; c.sram_addr = SAW'(a);
    step(c);
  endtask

  task automatic mac_steps(input logic [19:0] coef);
    dp_ctrl_t c;
    for (int k = 0; k < 20; k++) begin
      c = '0;
      if (k == 0)       c.a2_sel = coef[0];
      else if (k < 19) begin c.a2_sel = coef[k]; c.b1_sel = 1; end
      else begin
        c.a1_sel = 1; c.a2_sel = coef[19] ^ s_sign; c.cin = c.a2_sel;
        c.b2_sel = 1; c.t1_sel = 1;
        if (c.a2_sel) n_neg_prod++;
      end
      step(c);
    end
  endtask

  initial begin
    logic [31:0] t_ref, v, got;
    logic [19:0] cf;
    logic [15:0] x, y;
    dp_ctrl_t    c;
    rst = 1; ctrl = '0; bit_en = 0; word_en = 0; x_bit = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    t_ref = 0;
    for (int r = 0; r < 60; r++) begin
      // new input word; the output register receives the old dff_t
      x = 16'($urandom);
      shift_word(x);
      c = '0; c.t2_sel = 1;
      step(c);
      // output word: previous dff_t, LSB first
      for (int i = 0; i < 16; i++) begin
        y[i] = y_bit;
        @(negedge clk) bit_en = 1;
        @(negedge clk) bit_en = 0;
      end
      expect_eq(32'(y), 32'(t_ref[15:0]), "serial output word");
      t_ref = {{16{x[15]}}, x};
      expect_eq(dut.dff_t, t_ref, "sign-extended input");
      for (int m = 0; m < 3; m++) begin
        v  = {1'($urandom), 3'b0, 28'($urandom)};     // |v| < 2**28
        cf = 20'($urandom);
        dut.u_sram.mem[m] = v;
        rd(m);
        mac_steps(cf);
        t_ref = mac(t_ref, v, cf);
        expect_eq(dut.dff_t, t_ref, "multiply-accumulate");
      end
      // dff_t -> sign-magnitude -> SRAM[8], dff_t <= 0
      c = '0; c.b2_sel = 1; step(c);
      if (a_sign) n_neg_sm++;
      c = '0; c.a1_sel = 1; c.a2_sel = a_sign; c.cin = a_sign; step(c);
      c = '0; c.sram_wen = 1; c.sram_addr = SAW'(8); c.t1_sel = 1; step(c);
      expect_eq(dut.u_sram.mem[8], to_sm(t_ref), "sign-magnitude store");
      expect_eq(dut.dff_t, 32'h0, "accumulator cleared");
      // copy SRAM[8] to SRAM[5] through dff_s, then put it back into dff_t
      rd(8);
      c = '0; c.sram_wen = 1; c.sram_addr = SAW'(5); c.w_sel = 1; step(c);
      expect_eq(dut.u_sram.mem[5], to_sm(t_ref), "store from dff_s");
      mac_steps(20'h40000);   // * 1.0
      got = dut.dff_t;
      expect_eq(got, from_sm(to_sm(t_ref)), "round trip through SRAM");
      t_ref = got;
    end
    checks++;
    if (n_neg_prod == 0 || n_neg_sm == 0) begin
      failures++;
      $display("FAIL negative products %0d / negative conversions %0d", n_neg_prod, n_neg_sm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
