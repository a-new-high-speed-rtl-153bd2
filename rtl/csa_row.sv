// csa_row: one row of full adders ("3-bit counters") of the reduction tree.
//
// Reduces three W-bit rows a, b, d to a sum row and a carry row with
// a + b + d = sum + carry (mod 2^W). The carry of bit i lands in bit i+1 of
// the carry row; bit 0 of the carry row is 0. The carry out of the top bit
// lies outside the W-bit result and is dropped (lint reports it as unused).
// Purely combinational.
module csa_row #(
  parameter int unsigned W = 72
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] d,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] c;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.x(a[i]), .y(b[i]), .z(d[i]), .s(sum[i]), .c(c[i]));
  end

  assign carry = {c[W-2:0], 1'b0};
endmodule
