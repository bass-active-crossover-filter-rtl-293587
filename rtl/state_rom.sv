// state_rom -- microprogram of one second-order section.
//
// Indexed by the program counter; returns the micro-instruction the
// controller executes.  The 14 instructions compute one section on the
// shared datapath (s = current section, w1/w2 its two state words):
//    0 RD  w1      dff_s <= w1
//    1 MAC         dff_t += -a1 * w1      (dff_t holds the section input)
//    2 RD  w2      dff_s <= w2
//    3 MAC         dff_t += -a2 * w2      -> dff_t = w[n]
//    4 CPY         dff_a <= dff_t
//    5 SM          dff_a <= sign-magnitude(dff_a)
//    6 WRA tmp     tmp <= w[n], dff_t <= 0
//    7 MAC         dff_t += b2 * w2       (dff_s still holds w2)
//    8 RD  w1      dff_s <= w1
//    9 MAC         dff_t += b1 * w1
//   10 WRS w2      w2 <= w1
//   11 RD  tmp     dff_s <= w[n]
//   12 MAC         dff_t += b0 * w[n]     -> dff_t = y[n]
//   13 WRS w1      w1 <= w[n]; end of section
// The data sheet names a state ROM but does not list its contents; this
// program, its encoding and its length are this design's own.  Unused
// addresses hold NOP with the end-of-section flag set.  Combinational.
module state_rom
  import bxf_pkg::*;
(
  input  logic [PCW-1:0] pc,
  output uinst_t         uinst
);
  always_comb begin
    unique case (pc)
      PCW'(0):  uinst = '{op: OP_RD,  adr: AD_W1,  last: 1'b0};
      PCW'(1):  uinst = '{op: OP_MAC, adr: AD_W1,  last: 1'b0};
      PCW'(2):  uinst = '{op: OP_RD,  adr: AD_W2,  last: 1'b0};
      PCW'(3):  uinst = '{op: OP_MAC, adr: AD_W2,  last: 1'b0};
      PCW'(4):  uinst = '{op: OP_CPY, adr: AD_TMP, last: 1'b0};
      PCW'(5):  uinst = '{op: OP_SM,  adr: AD_TMP, last: 1'b0};
      PCW'(6):  uinst = '{op: OP_WRA, adr: AD_TMP, last: 1'b0};
      PCW'(7):  uinst = '{op: OP_MAC, adr: AD_W2,  last: 1'b0};
      PCW'(8):  uinst = '{op: OP_RD,  adr: AD_W1,  last: 1'b0};
      PCW'(9):  uinst = '{op: OP_MAC, adr: AD_W1,  last: 1'b0};
      PCW'(10): uinst = '{op: OP_WRS, adr: AD_W2,  last: 1'b0};
      PCW'(11): uinst = '{op: OP_RD,  adr: AD_TMP, last: 1'b0};
      PCW'(12): uinst = '{op: OP_MAC, adr: AD_TMP, last: 1'b0};
      PCW'(13): uinst = '{op: OP_WRS, adr: AD_W1,  last: 1'b1};
      default:  uinst = '{op: OP_NOP, adr: AD_TMP, last: 1'b1};
    endcase
  end
endmodule
