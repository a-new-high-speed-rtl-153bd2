// final_adder: carry-select final adder for the two rows left by the
// reduction tree.
//
// The W-bit operands are zero-extended to whole 16-bit segments. Every
// segment has its own carry propagate network, a 16-bit carry lookahead
// adder (cla16), that adds its slice with carry-in 0. For every segment but
// the lowest, an incrementer produces the slice sum plus one, and a
// multiplexer picks the plain or the incremented sum once the carry from the
// segment below is known. That carry is the segment's own carry-out, or its
// all-ones flag when a carry comes in. Only the one-gate carry-select chain
// runs across segments. The carry propagate networks, multiplexers and
// final adders follow the blocks of the design's architecture; reading them
// as a carry-select adder with 16-bit segments is this implementation's
// choice. Interface: x, y in; s = (x + y) mod 2^W out. Purely combinational.
module final_adder
  import mult_pkg::*;
#(
  parameter int unsigned W = 72
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);
  localparam int unsigned WP = pad_to_group(W);
  localparam int unsigned NS = WP / CLA_GROUP;

  logic [WP-1:0] xp;
  logic [WP-1:0] yp;
  logic [WP-1:0] sp;
  logic [NS:0]   c;   // carry into each segment

  assign xp   = WP'(x);
  assign yp   = WP'(y);
  assign c[0] = 1'b0;

  for (genvar k = 0; k < NS; k++) begin : g_seg
    logic [CLA_GROUP-1:0] s0;
    logic [CLA_GROUP-1:0] s1;
    logic                 c0;
    logic                 ones;

    cla16 u_cpn (
      .x   (xp[CLA_GROUP*k +: CLA_GROUP]),
      .y   (yp[CLA_GROUP*k +: CLA_GROUP]),
      .cin (1'b0),
      .s   (s0),
      .cout(c0)
    );

    if (k == 0) begin : g_low
      assign s1   = s0;
      assign ones = 1'b0;
    end else begin : g_inc
      incrementer #(.W(CLA_GROUP)) u_inc (.x(s0), .s(s1), .all_ones(ones));
    end

    assign sp[CLA_GROUP*k +: CLA_GROUP] = c[k] ? s1 : s0;
    assign c[k+1] = c0 | (c[k] & ones);
  end

  assign s = sp[W-1:0];
endmodule
