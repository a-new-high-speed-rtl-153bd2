// compressor_4to2: 4:2 compressor ("4-bit counter" of the reduction tree).
//
// Four equally weighted inputs i1..i4 and a horizontal carry-in cin are
// reduced to a sum bit (weight 1) and two carries (weight 2): carry and cout.
// As in the design, the compressor is two chained full adders: the first adds
// i1, i2, i3 and produces cout, which depends on i1..i3 only, so a row of
// compressors has no rippling carry; the second adds the first sum, i4 and
// cin. Identity: i1 + i2 + i3 + i4 + cin = sum + 2 * (carry + cout).
// Purely combinational.
module compressor_4to2 (
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa1 (.x(i1), .y(i2), .z(i3),  .s(s1),  .c(cout));
  full_adder u_fa2 (.x(s1), .y(i4), .z(cin), .s(sum), .c(carry));
endmodule
