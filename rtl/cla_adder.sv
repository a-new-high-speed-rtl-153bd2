// cla_adder: W-bit adder made of 16-bit carry lookahead groups (cla16).
//
// The operands are zero-extended to a whole number of groups; the groups are
// chained through their carry-out. Used where the datapath needs a plain
// carry-propagate addition, such as forming the hard Booth multiple 3X.
// A helper of this implementation, built from the design's 16-bit adder.
// The carry out of the last group is unused when W is not a whole number
// of groups (lint reports it).
// Interface: x, y, cin in; s (W bits) and cout (carry out of bit W-1) out.
// Purely combinational.
module cla_adder
  import mult_pkg::*;
#(
  parameter int unsigned W = 34
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned WP = pad_to_group(W);
  localparam int unsigned NG = WP / CLA_GROUP;

  logic [WP-1:0] xp;
  logic [WP-1:0] yp;
  logic [WP-1:0] sp;
  logic [NG:0]   c;

  assign xp   = WP'(x);
  assign yp   = WP'(y);
  assign c[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    cla16 u_grp (
      .x   (xp[CLA_GROUP*k +: CLA_GROUP]),
      .y   (yp[CLA_GROUP*k +: CLA_GROUP]),
      .cin (c[k]),
      .s   (sp[CLA_GROUP*k +: CLA_GROUP]),
      .cout(c[k+1])
    );
  end

  assign s = sp[W-1:0];

  // Carry out of bit W-1: when W fills the last group it is the group
  // carry; otherwise it is the bit of the padded sum just above W-1.
  if (WP == W) begin : g_full
    assign cout = c[NG];
  end else begin : g_part
    assign cout = sp[W];
  end
endmodule
