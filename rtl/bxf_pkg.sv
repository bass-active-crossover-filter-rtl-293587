// bxf_pkg -- types and constants shared by the bass crossover filter core.
//
// The filter is a cascade of NSEC second-order IIR sections computed on one
// 32-bit datapath.  Samples enter and leave as 16-bit serial words, the
// internal word is 32 bits, coefficients are 20-bit sign-magnitude numbers
// (bit 19 sign, bits 18:0 magnitude with 18 fraction bits, so |c| < 2).
// The delay-line store holds 9 words: two states per section plus one
// scratch word.  These sizes follow the data sheet; the microcode encoding
// and the datapath control bundle below are this design's own.
package bxf_pkg;

  localparam int unsigned DW         = 32;  // internal data width
  localparam int unsigned IOW        = 16;  // serial sample width
  localparam int unsigned CW         = 20;  // coefficient width
  localparam int unsigned CFRAC      = 18;  // fraction bits of a coefficient
  localparam int unsigned NSEC       = 4;   // second-order sections (8th order)
  localparam int unsigned NCPS       = 5;   // coefficients per section
  localparam int unsigned NCOEF      = NSEC * NCPS;
  localparam int unsigned SRAM_WORDS = 2 * NSEC + 1;
  localparam int unsigned SAW        = 4;   // delay-line store address width
  localparam int unsigned TMP_ADDR   = 2 * NSEC;  // scratch word

  // Width of the four control counters (program, loop, row, column).
  localparam int unsigned PCW   = 6;
  localparam int unsigned LOOPW = 5;
  localparam int unsigned ROWW  = 3;
  localparam int unsigned COLW  = 6;

  // Cycles of one serial multiply-accumulate: 19 shift-add steps and one
  // sign/accumulate step.
  localparam int unsigned MAC_CYCLES = CW;

  // Micro-operations of the state ROM.
  typedef enum logic [2:0] {
    OP_RD  = 3'd0,  // dff_s <= SRAM[addr]
    OP_MAC = 3'd1,  // 20-cycle dff_t += dff_s * coef
    OP_CPY = 3'd2,  // dff_a <= dff_t
    OP_SM  = 3'd3,  // dff_a <= sign-magnitude form of dff_a
    OP_WRA = 3'd4,  // SRAM[addr] <= dff_a, dff_t <= 0
    OP_WRS = 3'd5,  // SRAM[addr] <= dff_s
    OP_NOP = 3'd7
  } uop_e;

  // Which delay-line word a micro-operation addresses.
  typedef enum logic [1:0] {
    AD_W1  = 2'd0,  // w[n-1] of the current section
    AD_W2  = 2'd1,  // w[n-2] of the current section
    AD_TMP = 2'd2   // scratch word
  } adr_e;

  typedef struct packed {
    uop_e op;
    adr_e adr;
    logic last;     // last micro-instruction of a section
  } uinst_t;

  // Select lines of the datapath, named as in the datapath drawing.
  typedef struct packed {
    logic           sram_wen;
    logic [SAW-1:0] sram_addr;
    logic           w_sel;   // SRAM write data: 0 dff_a, 1 dff_s
    logic           r_sel;   // dff_s: 0 hold, 1 SRAM read data
    logic           a2_sel;  // multiplier bit / sign
    logic           a1_sel;  // adder A: 0 masked dff_s, 1 (inverted) dff_a
    logic           b1_sel;  // adder B: 0 b2 path, 1 dff_a >> 1
    logic           b2_sel;  // b2 path: 0 zero, 1 dff_t
    logic           cin;     // adder carry in
    logic           t1_sel;  // dff_t: 0 t2 path, 1 adder
    logic           t2_sel;  // t2 path: 0 hold dff_t, 1 sign-extended input
  } dp_ctrl_t;

endpackage
