// incrementer: W-bit conditional "+1" chain used by the carry-select final
// adder.
//
// The chain carries K, the "all lower bits are one" signal, two bits per
// step as the design's two-bit counter modules do: for the pair (i, i+1)
//   S_i     = x_i     ^ K_{i-1}
//   S_{i+1} = x_{i+1} ^ (x_i & K_{i-1})
//   K_{i+1} = x_{i+1} & x_i & K_{i-1}
// with K_{-1} = 1. So s = x + 1 and all_ones = (x == all ones), which is also
// the carry out of the increment. The two-bit steps follow the design's
// counter equations, read as an increment chain; the design's companion
// all-zeros chain is not needed here and is left out. W must be even.
// Purely combinational.
module incrementer #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] s,
  output logic         all_ones
);
  localparam int unsigned PAIRS = W / 2;

  logic [PAIRS:0] k;   // k[j]: bits 0 .. 2j-1 are all one

  assign k[0] = 1'b1;

  for (genvar j = 0; j < PAIRS; j++) begin : g_pair
    assign s[2*j]     = x[2*j] ^ k[j];
    assign s[2*j+1]   = x[2*j+1] ^ (x[2*j] & k[j]);
    assign k[j+1]     = x[2*j+1] & x[2*j] & k[j];
  end

  assign all_ones = k[PAIRS];

  initial assert (W % 2 == 0) else $error("incrementer: W must be even");
endmodule
