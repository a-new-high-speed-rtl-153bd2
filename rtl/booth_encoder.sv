// booth_encoder: radix-8 (high-radix) Booth digit encoder.
//
// One encoder looks at four overlapping multiplier bits
// b = {p[3k+2], p[3k+1], p[3k], p[3k-1]} and recodes them into the digit
// d = -4*b[3] + 2*b[2] + b[1] + b[0], one of {0, +-1, +-2, +-3, +-4}. The digit
// is given as a one-hot magnitude select (x1..x4, all low for zero) and a NEG
// bit. The magnitude is found by inverting the three low bits when the digit
// is negative, which turns the encoder into a small symmetric table. NEG is
// forced low for the pattern 1111 (digit -0), so a zero digit always yields an
// all-zero partial product. Three multiplier bits are retired per digit,
// which gives floor((m+2)/3) partial products for an m-bit multiplier.
// The radix-8 recoding and the NEG signal follow the design; the gate-level
// form of the encoder and the -0 rule are this implementation's choice.
// Purely combinational.
module booth_encoder
  import mult_pkg::*;
(
  input  logic [3:0]  b,     // {p[3k+2], p[3k+1], p[3k], p[3k-1]}
  output booth_sel_t  sel
);
  logic [2:0] t;

  always_comb begin
    t       = b[2:0] ^ {3{b[3]}};
    sel.neg = b[3] & ~(b[2] & b[1] & b[0]);
    sel.x1  = ~t[2] & (t[1] ^ t[0]);
    sel.x2  = (~t[2] & t[1] & t[0]) | (t[2] & ~t[1] & ~t[0]);
    sel.x3  = t[2] & (t[1] ^ t[0]);
    sel.x4  = t[2] & t[1] & t[0];
  end
endmodule
