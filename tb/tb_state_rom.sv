// tb_state_rom -- self-checking test of the section microprogram.
// Instead of comparing entry by entry, it executes the program symbolically
// on a model of the registers (which delay-line word sits in dff_s, what dff_t
// and dff_a hold) and checks that the section computes the direct form II
// equations: the two feedback products use w1 and w2, the state is stored
// before the feed-forward products, b2/b1/b0 multiply w2/w1/w, the delay line
// is shifted (w2 <- old w1, w1 <- w), exactly five MACs run, and the program
// ends with the end-of-section flag.  Unused addresses must be flagged NOP.
module tb_state_rom;
  import bxf_pkg::*;
  logic [PCW-1:0] pc;
  uinst_t         uinst;
  int checks = 0, failures = 0;

  state_rom dut (.pc, .uinst);

  // symbolic values
  typedef enum int {V_X, V_W1, V_W2, V_W, V_ZERO, V_Y, V_BAD} sym_e;

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL pc=%0d: %s", pc, what);
    end
  endtask

  initial begin
    sym_e s_reg, a_reg, t_reg;
    sym_e mem [3];      // W1, W2, TMP
    int   nmac;
    bit   done;
    mem[0] = V_W1; mem[1] = V_W2; mem[2] = V_BAD;
    s_reg = V_BAD; a_reg = V_BAD; t_reg = V_X;
    nmac = 0; done = 0;
    for (int i = 0; i < 64 && !done; i++) begin
      pc = PCW'(i);
      #1;
      unique case (uinst.op)
        OP_RD:  s_reg = mem[uinst.adr];
        OP_CPY: a_reg = t_reg;
        OP_SM:  expect_true(a_reg == V_W, "SM converts w");
        OP_WRA: begin mem[uinst.adr] = a_reg; t_reg = V_ZERO; end
        OP_WRS: mem[uinst.adr] = s_reg;
        OP_MAC: begin
          nmac++;
          unique case (nmac)
            1: begin expect_true(s_reg == V_W1 && t_reg == V_X, "MAC1 -a1*w1"); end
            2: begin expect_true(s_reg == V_W2, "MAC2 -a2*w2"); t_reg = V_W; end
            3: expect_true(s_reg == V_W2 && t_reg == V_ZERO, "MAC3 b2*w2");
            4: expect_true(s_reg == V_W1, "MAC4 b1*w1");
            5: begin expect_true(s_reg == V_W, "MAC5 b0*w"); t_reg = V_Y; end
            default: expect_true(0, "too many MACs");
          endcase
        end
        default: expect_true(0, "NOP inside the program");
      endcase
      if (uinst.last) done = 1;
    end
    expect_true(nmac == 5, "five MACs");
    expect_true(t_reg == V_Y, "dff_t holds y");
    expect_true(mem[0] == V_W && mem[1] == V_W1, "delay line shifted");
    expect_true(pc == PCW'(13), "14 instructions");
    for (int i = 14; i < 64; i++) begin
      pc = PCW'(i);
      #1;
      expect_true(uinst.op == OP_NOP && uinst.last, "unused entry");
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
