// compressor_row: one row of 4:2 compressors ("4-bit counters") of the
// reduction tree.
//
// Reduces four W-bit rows to a sum row and a carry row with
// a + b + d + e = sum + carry (mod 2^W). The horizontal carry-out of the
// compressor at bit i feeds the carry-in of the one at bit i+1; since it does
// not depend on that carry-in, nothing ripples along the row. Both carries
// out of the top bit lie outside the W-bit result and are dropped (lint
// reports them as unused). Purely combinational.
module compressor_row #(
  parameter int unsigned W = 72
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] d,
  input  logic [W-1:0] e,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] cy;

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic ci;   // horizontal carry-in from bit i-1
    logic co;   // horizontal carry-out to bit i+1

    if (i == 0) begin : g_lsb
      assign ci = 1'b0;
    end else begin : g_chain
      assign ci = g_bit[i-1].co;
    end

    compressor_4to2 u_cmp (
      .i1   (a[i]),
      .i2   (b[i]),
      .i3   (d[i]),
      .i4   (e[i]),
      .cin  (ci),
      .sum  (sum[i]),
      .carry(cy[i]),
      .cout (co)
    );
  end

  // carries of the top bit fall outside the W-bit result (mod 2^W)
  assign carry = {cy[W-2:0], 1'b0};
endmodule
