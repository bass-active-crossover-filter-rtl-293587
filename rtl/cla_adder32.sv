// cla_adder32 -- the datapath adder: WIDTH bits from 4-bit carry-lookahead
// groups.
//
// The data sheet gives a 32-bit adder "with 4-bit carry lookahead"; how the
// groups are joined is not given.  Here the group carries ripple from one
// cla4 group to the next (cout_g = gg | gp & cin_g), the simplest joining.
// Combinational; WIDTH must be a multiple of 4.
module cla_adder32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NG = WIDTH / 4;

  logic [NG:0]   gc;      // carry into each group
  logic [NG-1:0] gg, gp;

  assign gc[0] = cin;

  for (genvar i = 0; i < NG; i++) begin : g_grp
    cla4 u_grp (
      .a  (a[4*i +: 4]),
      .b  (b[4*i +: 4]),
      .cin(gc[i]),
      .sum(sum[4*i +: 4]),
      .gg (gg[i]),
      .gp (gp[i])
    );
    assign gc[i+1] = gg[i] | (gp[i] & gc[i]);
  end

  assign cout = gc[NG];

  initial begin
    assert (WIDTH % 4 == 0) else $error("cla_adder32: WIDTH must be a multiple of 4");
  end
endmodule
