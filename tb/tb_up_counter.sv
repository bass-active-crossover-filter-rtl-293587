// tb_up_counter -- self-checking test of the control counters.
// A 5-bit and a 3-bit counter get random enable and clear patterns; their
// outputs are compared every cycle with a reference count modulo 2**WIDTH.
module tb_up_counter;
  logic       clk = 0, rst;
  logic       clr, en;
  logic [4:0] q5;
  logic [2:0] q3;
  int         ref5, ref3;
  int checks = 0, failures = 0;

  up_counter #(.WIDTH(5)) dut5 (.clk, .rst, .clr, .en, .q(q5));
  up_counter #(.WIDTH(3)) dut3 (.clk, .rst, .clr, .en, .q(q3));

  always #5 clk = ~clk;

  initial begin
    rst = 1; clr = 0; en = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    ref5 = 0; ref3 = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (q5 !== 5'(ref5) || q3 !== 3'(ref3)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: q5=%0d/%0d q3=%0d/%0d", i, q5, ref5 % 32, q3, ref3 % 8);
      end
      clr = ($urandom_range(0, 63) == 0);
      en  = (i < 100) ? 1'b1 : 1'($urandom_range(0, 1));
      if (clr) begin ref5 = 0; ref3 = 0; end
      else if (en) begin ref5 = (ref5 + 1) % 32; ref3 = (ref3 + 1) % 8; end
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
