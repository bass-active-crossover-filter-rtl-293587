// tb_cla_adder32 -- self-checking test of the 32-bit carry-lookahead adder.
// Compares sum and carry-out with a 33-bit reference addition for corner
// operands (carry chains through every group) and 20000 random ones.
module tb_cla_adder32;
  logic [31:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;

  cla_adder32 #(.WIDTH(32)) dut (.a, .b, .cin, .sum, .cout);

  task automatic check_one(input logic [31:0] ta, input logic [31:0] tb_, input logic tc);
    logic [32:0] ref_sum;
    a = ta; b = tb_; cin = tc;
    #1;
    ref_sum = {1'b0, ta} + {1'b0, tb_} + 33'(tc);
    checks++;
    if ({cout, sum} !== ref_sum) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %0d = %h, want %h", ta, tb_, tc, {cout, sum}, ref_sum);
    end
  endtask

  initial begin
    check_one(32'hFFFF_FFFF, 32'h0, 1'b1);
    check_one(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check_one(32'h7FFF_FFFF, 32'h1, 1'b0);
    check_one(32'h0, 32'h0, 1'b0);
    for (int g = 0; g < 8; g++) check_one(32'hF << (4 * g), 32'h1 << (4 * g), 1'b0);
    for (int i = 0; i < 20000; i++) check_one($urandom, $urandom, 1'($urandom));
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
