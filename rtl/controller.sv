// controller -- the glue logic that sequences the datapath.
//
// After reset it clears the nine delay-line words (CLEAR), then waits for a
// word strobe (IDLE).  On the strobe the datapath shifts out the previous
// result and the controller loads the new input word into dff_t (LOADX), then
// runs the 14-instruction section microprogram from the state ROM four times
// (RUN), once per section, and returns to IDLE with the filter output in
// dff_t.  Four counters hold its position: the program counter (state ROM
// address), the loop counter (step 0..19 of a multiply-accumulate, also the
// coefficient bit), the row counter (section) and the column counter
// (coefficient 0..19).
//
// Timing: 1 + 4 * (9 + 5 * 20) = 437 cycles from the word strobe to the end
// of RUN, after which busy falls.  A word strobe that arrives while busy is
// ignored, so the word period must exceed 437 clock cycles.
// The counters and their widths, and the role of the state ROM, follow the
// data sheet; the state encoding, the clear sequence and the microprogram
// are this design's own.
module controller
  import bxf_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           word_en,
  input  logic           s_sign,      // dff_s[31]
  input  logic           a_sign,      // dff_a[31]
  // state ROM
  output logic [PCW-1:0] pc,
  input  uinst_t         uinst,
  // coefficient ROM
  output logic [4:0]     coef_index,
  output logic [4:0]     coef_bit_sel,
  input  logic           coef_bit,
  input  logic           coef_sign,
  // datapath
  output dp_ctrl_t       ctrl,
  output logic           busy
);
  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_LOADX, S_RUN} state_e;

  state_e            state, state_n;
  logic [LOOPW-1:0]  loop;
  logic [ROWW-1:0]   row;
  logic [COLW-1:0]   col;
  logic pc_clr, pc_en, loop_clr, loop_en, row_clr, row_en, col_clr, col_en;
  logic adv, mac_last, psign;

  up_counter #(.WIDTH(PCW))   u_pc   (.clk, .rst, .clr(pc_clr),   .en(pc_en),   .q(pc));
  up_counter #(.WIDTH(LOOPW)) u_loop (.clk, .rst, .clr(loop_clr), .en(loop_en), .q(loop));
  up_counter #(.WIDTH(ROWW))  u_row  (.clk, .rst, .clr(row_clr),  .en(row_en),  .q(row));
  up_counter #(.WIDTH(COLW))  u_col  (.clk, .rst, .clr(col_clr),  .en(col_en),  .q(col));

  assign coef_index   = col[4:0];
  assign coef_bit_sel = loop;
  assign mac_last     = (loop == LOOPW'(MAC_CYCLES - 1));
  assign psign        = coef_sign ^ s_sign;   // sign of the product
  assign busy         = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) state <= S_CLEAR;
    else     state <= state_n;
  end

  always_comb begin
    ctrl     = '0;     // adder output 0, dff_s and dff_t hold
    state_n  = state;
    pc_clr   = 1'b0;  pc_en   = 1'b0;
    loop_clr = 1'b0;  loop_en = 1'b0;
    row_clr  = 1'b0;  row_en  = 1'b0;
    col_clr  = 1'b0;  col_en  = 1'b0;
    adv      = 1'b0;

    unique case (state)
      S_CLEAR: begin
        // dff_a is zero here (reset, then adder output 0 every cycle)
        ctrl.sram_wen  = 1'b1;
        ctrl.sram_addr = loop[SAW-1:0];
        loop_en        = 1'b1;
        if (loop == LOOPW'(SRAM_WORDS - 1)) begin
          loop_clr = 1'b1;
          state_n  = S_IDLE;
        end
      end
      S_IDLE: begin
        if (word_en) state_n = S_LOADX;
      end
      S_LOADX: begin
        ctrl.t2_sel = 1'b1;
        pc_clr = 1'b1;  loop_clr = 1'b1;  row_clr = 1'b1;  col_clr = 1'b1;
        state_n = S_RUN;
      end
      S_RUN: begin
        unique case (uinst.adr)
          AD_W1:   ctrl.sram_addr = SAW'({row, 1'b0});
          AD_W2:   ctrl.sram_addr = SAW'({row, 1'b1});
          default: ctrl.sram_addr = SAW'(TMP_ADDR);
        endcase
        unique case (uinst.op)
          OP_RD: begin
            ctrl.r_sel = 1'b1;
            adv = 1'b1;
          end
          OP_MAC: begin
            loop_en = 1'b1;
            if (loop == '0) begin
              ctrl.a2_sel = coef_bit;                 // dff_a = c[0] ? |s| : 0
            end else if (!mac_last) begin
              ctrl.a2_sel = coef_bit;                 // dff_a = dff_a>>1 + c[k]*|s|
              ctrl.b1_sel = 1'b1;
            end else begin
              ctrl.a1_sel = 1'b1;                     // dff_t += +/- dff_a
              ctrl.a2_sel = psign;
              ctrl.cin    = psign;
              ctrl.b2_sel = 1'b1;
              ctrl.t1_sel = 1'b1;
              loop_clr = 1'b1;
              col_en   = 1'b1;
              adv      = 1'b1;
            end
          end
          OP_CPY: begin
            ctrl.b2_sel = 1'b1;                       // dff_a = dff_t
            adv = 1'b1;
          end
          OP_SM: begin
            ctrl.a1_sel = 1'b1;                       // dff_a = sign-magnitude
            ctrl.a2_sel = a_sign;
            ctrl.cin    = a_sign;
            adv = 1'b1;
          end
          OP_WRA: begin
            ctrl.sram_wen = 1'b1;                     // SRAM <= dff_a
            ctrl.t1_sel   = 1'b1;                     // dff_t <= 0
            adv = 1'b1;
          end
          OP_WRS: begin
            ctrl.sram_wen = 1'b1;                     // SRAM <= dff_s
            ctrl.w_sel    = 1'b1;
            adv = 1'b1;
          end
          default: adv = 1'b1;
        endcase
        if (adv) begin
          if (uinst.last) begin
            pc_clr = 1'b1;
            row_en = 1'b1;
            if (row == ROWW'(NSEC - 1)) state_n = S_IDLE;
          end else begin
            pc_en = 1'b1;
          end
        end
      end
      default: state_n = S_IDLE;
    endcase
  end

  // A multiply-accumulate never runs past its sign step, and the program
  // never leaves the section microprogram.
  a_loop_bound: assert property (@(posedge clk) disable iff (rst)
                                 loop < LOOPW'(MAC_CYCLES));
  a_no_nop: assert property (@(posedge clk) disable iff (rst)
                             state == S_RUN |-> uinst.op != OP_NOP);
endmodule
