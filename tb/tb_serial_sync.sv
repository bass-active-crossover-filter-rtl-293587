// tb_serial_sync -- self-checking test of the serial-port synchroniser.
// Drives Bit Clock with a period of 8 system clocks and Word Clock high for
// one bit in every 20.  Checks one bit strobe per Bit Clock rising edge,
// three cycles after it, word strobes only with Word Clock, and the sampled
// data bit.
module tb_serial_sync;
  logic clk = 0, rst;
  logic bit_clk, word_clk, x_bit;
  logic bit_en, word_en, x_bit_s;
  int   checks = 0, failures = 0;
  int   cyc = 0, last_rise = -1, n_bits = 0, n_words = 0;
  logic exp_x, exp_w;

  serial_sync #(.STAGES(2)) dut (.clk, .rst, .bit_clk, .word_clk, .x_bit, .bit_en, .word_en, .x_bit_s);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (!rst && bit_en) begin
    n_bits++;
    checks++;
    if (cyc - last_rise != 3) begin
      failures++;
      $display("FAIL strobe latency %0d", cyc - last_rise);
    end
    checks++;
    if (x_bit_s !== exp_x || word_en !== exp_w) begin
      failures++;
      $display("FAIL data %b/%b word %b/%b", x_bit_s, exp_x, word_en, exp_w);
    end
    if (word_en) n_words++;
  end

  always @(posedge clk) if (!rst && word_en && !bit_en) begin
    failures++;
    $display("FAIL word strobe without bit strobe");
  end

  initial begin
    rst = 1; bit_clk = 0; word_clk = 0; x_bit = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 400; i++) begin
      repeat (4) @(negedge clk);
      bit_clk  = 0;
      x_bit    = 1'($urandom);
      word_clk = (i % 20 == 19);
      repeat (4) @(negedge clk);
      bit_clk   = 1;
      exp_x     = x_bit;
      exp_w     = word_clk;
      last_rise = cyc;
    end
    repeat (10) @(negedge clk);
    checks++;
    if (n_bits != 400 || n_words != 20) begin
      failures++;
      $display("FAIL counts bits=%0d words=%0d", n_bits, n_words);
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
