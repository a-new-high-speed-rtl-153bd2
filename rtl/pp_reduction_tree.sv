// pp_reduction_tree: Wallace-style partial product reduction tree built from
// rows of 4:2 compressors and 3:2 full adders.
//
// At every level the rows present are taken four at a time into a row of
// 4:2 compressors (compressor_row), each group giving two rows. If three
// rows remain they go through a row of full adders (csa_row); one or two
// remaining rows are buffered to the next level unchanged. Levels repeat
// until two rows are left: R = 14 rows, for example, go 14 -> 8 -> 4 -> 2 in
// three levels. The row counts per level come from mult_pkg::rows_at at
// elaboration time, so the tree is regular: each level is a few identical
// full-width rows of cells. The use of 4:2 counters, 3:2 counters and
// buffers follows the design's architecture; the row-wise grouping rule is
// this implementation's choice.
//
// Interface: rows[0..R-1] in (all W bits, already aligned); sum and carry
// out, with sum + carry = the sum of all rows (mod 2^W). Purely
// combinational.
module pp_reduction_tree
  import mult_pkg::*;
#(
  parameter int unsigned W = 72,
  parameter int unsigned R = 14
) (
  input  logic [W-1:0] rows [R],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  localparam int unsigned LEVELS = tree_levels(R);

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned RIN  = rows_at(R, l);
    localparam int unsigned ROUT = rows_at(R, l + 1);
    localparam int unsigned NQ   = RIN / 4;
    localparam int unsigned REM  = RIN % 4;

    logic [W-1:0] din  [RIN];    // rows entering this level
    logic [W-1:0] dout [ROUT];   // rows leaving this level

    for (genvar r = 0; r < RIN; r++) begin : g_in
      if (l == 0) begin : g_first
        assign din[r] = rows[r];
      end else begin : g_next
        assign din[r] = g_lvl[l-1].dout[r];
      end
    end

    for (genvar g = 0; g < NQ; g++) begin : g_cmp
      compressor_row #(.W(W)) u_row (
        .a    (din[4*g]),
        .b    (din[4*g+1]),
        .d    (din[4*g+2]),
        .e    (din[4*g+3]),
        .sum  (dout[2*g]),
        .carry(dout[2*g+1])
      );
    end

    if (REM == 3) begin : g_fa
      csa_row #(.W(W)) u_row (
        .a    (din[4*NQ]),
        .b    (din[4*NQ+1]),
        .d    (din[4*NQ+2]),
        .sum  (dout[2*NQ]),
        .carry(dout[2*NQ+1])
      );
    end else begin : g_buf
      for (genvar j = 0; j < REM; j++) begin : g_pass
        assign dout[2*NQ+j] = din[4*NQ+j];
      end
    end
  end

  if (LEVELS > 0) begin : g_out
    assign sum   = g_lvl[LEVELS-1].dout[0];
    assign carry = g_lvl[LEVELS-1].dout[1];
  end else if (R == 2) begin : g_two
    assign sum   = rows[0];
    assign carry = rows[1];
  end else begin : g_one
    assign sum   = rows[0];
    assign carry = '0;
  end
endmodule
