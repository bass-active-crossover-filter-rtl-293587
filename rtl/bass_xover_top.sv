// bass_xover_top -- bass active crossover filter core.
//
// An 8th-order Chebyshev type II low- or high-pass filter for a 16-bit serial
// audio stream, computed as four second-order sections on one 32-bit
// datapath with a bit-serial (20 cycles per product) multiplier.
//
// Ports are the signal pads of the chip: clk (system clock), rst (synchronous,
// active high), high_pass (1 high-pass, 0 low-pass), freq (cut-off 0: 80 Hz,
// 1: 120 Hz, 2/3: 160 Hz at 48 kHz sampling), bit_clk, word_clk, x_bit in and
// y_bit out.  Serial words are 16 bits, LSB first, sampled on rising bit_clk
// edges.  word_clk high at a bit_clk edge marks that bit as the last (MSB) of
// an input word; at the same edge the output register loads the previous
// sample's result, so y_bit carries y[n-1] LSB first, its bit k valid after the
// k-th following bit_clk edge.  Filtering a sample takes 437 clk cycles after
// the word edge (plus 3 cycles of synchronisation), so clk must run at least
// 441 times the sample rate and at least three times bit_clk.
// The partitioning into datapath, SRAM, state ROM, coefficient ROM, counters
// and glue logic follows the data sheet's floorplan; serial-port
// synchronisation is this design's own.
module bass_xover_top
  import bxf_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       high_pass,
  input  logic [1:0] freq,
  input  logic       bit_clk,
  input  logic       word_clk,
  input  logic       x_bit,
  output logic       y_bit
);
  logic           bit_en, word_en, x_bit_s;
  logic           s_sign, a_sign, busy;
  logic [PCW-1:0] pc;
  uinst_t         uinst;
  logic [4:0]     coef_index, coef_bit_sel;
  logic [CW-1:0]  coef_word;
  logic           coef_bit;
  dp_ctrl_t       ctrl;

  serial_sync #(.STAGES(2)) u_sync (
    .clk, .rst, .bit_clk, .word_clk, .x_bit,
    .bit_en, .word_en, .x_bit_s
  );

  state_rom u_state_rom (.pc, .uinst);

  coef_rom u_coef_rom (
    .high_pass,
    .freq,
    .index   (coef_index),
    .bit_sel (coef_bit_sel),
    .word    (coef_word),
    .coef_bit
  );

  controller u_ctrl (
    .clk, .rst, .word_en, .s_sign, .a_sign,
    .pc, .uinst,
    .coef_index, .coef_bit_sel, .coef_bit,
    .coef_sign(coef_word[CW-1]),
    .ctrl, .busy
  );

  datapath u_dp (
    .clk, .rst, .ctrl, .bit_en, .word_en,
    .x_bit(x_bit_s),
    .y_bit, .s_sign, .a_sign
  );
endmodule
