// tb_sram -- self-checking test of the 9 x 32 delay-line store.
// Writes random words, reads them back against a shadow copy, checks that
// a write with wen low changes nothing and that addresses 9..15 read zero.
module tb_sram;
  localparam int WORDS = 9;
  logic        clk = 0;
  logic        wen;
  logic [3:0]  addr;
  logic [31:0] din, dout;
  logic [31:0] shadow [WORDS];
  int checks = 0, failures = 0;

  sram #(.WORDS(WORDS), .WIDTH(32), .AW(4)) dut (.clk, .wen, .addr, .din, .dout);

  always #5 clk = ~clk;

  task automatic wr(input int a, input logic [31:0] d, input logic en);
    @(negedge clk);
    wen = en; addr = 4'(a); din = d;
    @(negedge clk);
    wen = 0;
    if (en && a < WORDS) shadow[a] = d;
  endtask

  task automatic rd_check(input int a);
    @(negedge clk);
    addr = 4'(a);
    #1;
    checks++;
    if (dout !== ((a < WORDS) ? shadow[a] : 32'h0)) begin
      failures++;
      $display("FAIL read %0d: %h", a, dout);
    end
  endtask

  initial begin
    wen = 0; addr = 0; din = 0;
    for (int i = 0; i < WORDS; i++) wr(i, $urandom, 1'b1);
    for (int i = 0; i < 16; i++) rd_check(i);
    for (int r = 0; r < 500; r++) begin
      int a;
      a = $urandom_range(0, 15);
      wr(a, $urandom, 1'($urandom_range(0, 3) != 0));
      rd_check($urandom_range(0, 15));
      rd_check(a);
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
