// full_adder: one-bit full adder (3:2 counter), the basic cell of the
// reduction tree.
//
// The cell follows the transmission-gate structure of the design: an XOR /
// XNOR pair of the inputs x and y is formed first, and two multiplexers steered
// by that pair then produce the outputs. The sum multiplexer passes z or its
// complement; the carry multiplexer passes z when x and y differ and x when
// they are equal (then x == y is the carry). Expressing the cell as these
// multiplexers is this design's reading of the transistor schematic; the
// logic function is the ordinary full adder.
//
// Interface: x, y, z are the three equally weighted inputs; s is the sum
// (weight 1) and c the carry (weight 2). Purely combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);
  logic xo;   // x XOR y
  logic xn;   // x XNOR y

  always_comb begin
    xo = x ^ y;
    xn = ~xo;
    // Sum multiplexer: select ~z when x != y, z when x == y.
    s  = xo ? ~z : (xn & z);
    // Carry multiplexer: select z when x != y, x (== y) when x == y.
    c  = xo ? z : x;
  end
endmodule
