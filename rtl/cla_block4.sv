// cla_block4: 4-bit adder block of the carry lookahead adder.
//
// Adds x and y with carry-in cin and also gives the block's group propagate
// (gp) and group generate (gg) for the lookahead logic above it. Bit propagate
// is x | y and bit generate is x & y, as the design defines them; with an
// OR-propagate the group generate alone decides a carry-out, and the group
// propagate passes cin through. Inside the block the carries are formed by
// lookahead on the four bits; that inner structure is this implementation's
// choice, as the design shows the block only as a box. Purely combinational.
module cla_block4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  input  logic       cin,
  output logic [3:0] s,
  output logic       gp,
  output logic       gg
);
  logic [3:0] p;
  logic [3:0] g;
  logic [3:0] c;

  always_comb begin
    p    = x | y;
    g    = x & y;
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    s    = x ^ y ^ c;  // the block carry-out leaves through gp / gg
    gp   = &p;
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
  end
endmodule
