// serial_sync -- brings the serial-port clocks into the system clock domain.
//
// Bit Clock, Word Clock and the serial input bit pass through STAGES
// flip-flops each (so they stay aligned with one another).  bit_en is a
// one-cycle strobe on each rising edge of Bit Clock; word_en is bit_en
// qualified by Word Clock being high at that edge, marking the last bit of an
// input word and the first bit of an output word; x_bit_s is the input bit
// sampled at that edge.  The data sheet clocks its serial shift registers
// directly from Bit Clock; driving them from the system clock with these
// strobes is this design's choice and needs the system clock to run at least
// three times faster than Bit Clock.  Latency: STAGES+1 clock cycles.
module serial_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic bit_clk,
  input  logic word_clk,
  input  logic x_bit,
  output logic bit_en,
  output logic word_en,
  output logic x_bit_s
);
  logic [STAGES-1:0] bclk_q, wclk_q, x_q;
  logic              bclk_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      bclk_q <= '0;
      wclk_q <= '0;
      x_q    <= '0;
      bclk_d <= 1'b0;
    end else begin
      bclk_q <= {bclk_q[STAGES-2:0], bit_clk};
      wclk_q <= {wclk_q[STAGES-2:0], word_clk};
      x_q    <= {x_q[STAGES-2:0], x_bit};
      bclk_d <= bclk_q[STAGES-1];
    end
  end

  assign bit_en  = bclk_q[STAGES-1] & ~bclk_d;
  assign word_en = bit_en & wclk_q[STAGES-1];
  assign x_bit_s = x_q[STAGES-1];

  initial begin
    assert (STAGES >= 2) else $error("serial_sync: STAGES must be at least 2");
  end
endmodule
