// sram -- the delay-line store: WORDS x WIDTH single-port memory.
//
// Holds the filter state words in sign-magnitude form.  Reads are
// asynchronous (the read word is captured by the datapath register dff_s,
// which isolates the array from the rest of the datapath); a write happens at
// the rising clock edge when wen is high.  Size 9 x 32 follows the data
// sheet's floorplan; the read/write timing is this design's choice.  The
// array has no reset: the controller clears it after reset.  Addresses at or
// above WORDS read as zero and are not written.
module sram #(
  parameter int unsigned WORDS = 9,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 4
) (
  input  logic             clk,
  input  logic             wen,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wen && addr < AW'(WORDS)) mem[addr] <= din;
  end

  always_comb begin
    dout = '0;
    if (addr < AW'(WORDS)) dout = mem[addr];
  end
endmodule
