// datapath -- the 32-bit arithmetic unit of the filter, with its serial ports.
//
// Registers (all clocked by clk):
//   dff_s  32-bit copy of a delay-line word (sign-magnitude), loaded from the
//          SRAM or held; it is also the SRAM write source when w_sel = 1.
//   dff_a  product / scratch register, loaded from the adder every cycle.
//   dff_t  accumulator (two's complement), loaded from the adder, from the
//          sign-extended input word, or held.
//   dff_i  16-bit input shift register, LSB first, shifted on bit_en.
//   dff_o  16-bit output shift register, LSB first: loads dff_t[15:0] on
//          word_en, otherwise shifts right with zero fill on bit_en.
// Adder operands:
//   A = a1_sel ? {a2_sel, a2_sel ? ~dff_a[30:0] : dff_a[30:0]}
//              : {1'b0,   a2_sel ?  dff_s[30:0] : 31'b0}
//   B = b1_sel ? dff_a >> 1 : (b2_sel ? dff_t : 0),   plus cin.
// With these, one serial multiply-accumulate of a sign-magnitude dff_s by a
// 20-bit sign-magnitude coefficient c takes 20 cycles: step 0 sets
// dff_a = c[0] ? |s| : 0, steps 1..18 set dff_a = (dff_a >> 1) + (c[k] ? |s| : 0),
// so dff_a = floor(|s| * |c| / 2**18); step 19 drives a2_sel = cin = sign of
// the product and adds the (possibly negated) product to dff_t.  The same
// upper path with a2_sel = cin = dff_a[31] turns a two's complement dff_a into
// sign-magnitude before it is written to the SRAM.
// The registers, muxes and their select names follow the datapath drawing of
// the data sheet; the reset values, the low 16 bits of dff_t as output word
// and the single clock domain are this design's choices.  A product magnitude
// is kept to 31 bits and dff_t wraps on overflow; the output word is the low
// 16 bits of dff_t without saturation.
module datapath
  import bxf_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  dp_ctrl_t ctrl,
  input  logic     bit_en,
  input  logic     word_en,
  input  logic     x_bit,
  output logic     y_bit,
  output logic     s_sign,   // dff_s[31]
  output logic     a_sign    // dff_a[31]
);
  logic [DW-1:0]  dff_s, dff_a, dff_t;
  logic [IOW-1:0] dff_i, dff_o;
  logic [DW-1:0]  sram_din, sram_dout;
  logic [DW-1:0]  a_upper, a_lower, op_a, b2_out, op_b, sum, x_ext, t2_out;
  logic           cout_unused;

  sram #(.WORDS(SRAM_WORDS), .WIDTH(DW), .AW(SAW)) u_sram (
    .clk (clk),
    .wen (ctrl.sram_wen),
    .addr(ctrl.sram_addr),
    .din (sram_din),
    .dout(sram_dout)
  );

  always_comb begin
    sram_din = ctrl.w_sel ? dff_s : dff_a;
    a_upper  = {ctrl.a2_sel, ctrl.a2_sel ? ~dff_a[DW-2:0] : dff_a[DW-2:0]};
    a_lower  = {1'b0, ctrl.a2_sel ? dff_s[DW-2:0] : {(DW-1){1'b0}}};
    op_a     = ctrl.a1_sel ? a_upper : a_lower;
    b2_out   = ctrl.b2_sel ? dff_t : '0;
    op_b     = ctrl.b1_sel ? (dff_a >> 1) : b2_out;
    x_ext    = {{(DW-IOW){dff_i[IOW-1]}}, dff_i};
    t2_out   = ctrl.t2_sel ? x_ext : dff_t;
  end

  cla_adder32 #(.WIDTH(DW)) u_adder (
    .a   (op_a),
    .b   (op_b),
    .cin (ctrl.cin),
    .sum (sum),
    .cout(cout_unused)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      dff_s <= '0;
      dff_a <= '0;
      dff_t <= '0;
    end else begin
      if (ctrl.r_sel) dff_s <= sram_dout;
      dff_a <= sum;
      dff_t <= ctrl.t1_sel ? sum : t2_out;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dff_i <= '0;
      dff_o <= '0;
    end else if (bit_en) begin
      dff_i <= {x_bit, dff_i[IOW-1:1]};
      dff_o <= word_en ? dff_t[IOW-1:0] : {1'b0, dff_o[IOW-1:1]};
    end
  end

  assign y_bit  = dff_o[0];
  assign s_sign = dff_s[DW-1];
  assign a_sign = dff_a[DW-1];

  // A word strobe is always also a bit strobe.
  a_word_is_bit: assert property (@(posedge clk) disable iff (rst) word_en |-> bit_en);
endmodule
