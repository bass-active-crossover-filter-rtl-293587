// cla4 -- 4-bit carry-lookahead adder group.
//
// Computes generate and propagate per bit and derives all four carries
// directly from cin (two-level lookahead), as the data sheet's adder is built
// from 4-bit carry-lookahead units.  Also returns the group generate and
// propagate.  Purely combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       gg,    // group generate
  output logic       gp     // group propagate
);
  logic [3:0] g, p;
  logic [3:0] c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    sum = p ^ c[3:0];
    gg  = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    gp  = &p;
  end
endmodule
