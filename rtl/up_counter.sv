// up_counter -- WIDTH-bit synchronous up-counter with clear and enable.
//
// The control unit uses four of these: the program counter, the loop counter
// that steps through the 20 cycles of a multiply-accumulate, the row counter
// that selects the filter section, and the column counter that selects the
// coefficient.  clr has priority over en; the count wraps at 2**WIDTH.
// Synchronous active-high reset to zero.
module up_counter #(
  parameter int unsigned WIDTH = 6
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             en,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst || clr) q <= '0;
    else if (en)    q <= q + 1'b1;
  end
endmodule
