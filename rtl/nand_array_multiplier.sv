// nand_array_multiplier: N x N two's complement array multiplier whose
// partial product bits come from NAND gates.
//
// Of the N*N partial product bits a_i*b_j, bit a0*b0 is made by an AND gate
// and goes straight to P0; every other bit is made by a NAND gate. The NAND
// output is exactly what two's complement needs for the bits of negative
// weight (one index equal to N-1, the other not): -a*b = ~(a*b) - 1, and the
// collected -1 terms reduce to a single 1 added at column N together with an
// inversion of the top product bit. For the bits of positive weight the
// adder cell takes the NAND output in complemented form; in this RTL that
// complement is written as an explicit inversion at the cell input.
//
// The bits are summed by a carry-save array of full adders, one row per
// multiplier bit b1..b_{N-1}: the cell at row j, position i adds a_i*b_j,
// the sum from row j-1, position i+1, and the carry from row j-1, position
// i. Row j delivers product bit P_j. A final row of N-1 full adders with a
// rippling carry (carry-in 0) delivers P_N .. P_{2N-2}; P_{2N-1} is the
// complement of the last sum, the inverter on the top bit. The default N = 5
// is the size of the drawn array; the exact polarity type of each cell is
// not reproduced, only the arithmetic it performs.
//
// Interface: a, b (N-bit two's complement) in; prod (2N bits, two's
// complement) out. Purely combinational.
module nand_array_multiplier #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] prod
);
  // nb[j][i] = ~(a_i & b_j); pp[j][i] is the bit as seen by the adder cell
  logic [N-1:0] nb [N];
  logic [N-1:0] pp [N];

  for (genvar j = 0; j < N; j++) begin : g_ppj
    for (genvar i = 0; i < N; i++) begin : g_ppi
      if (i == 0 && j == 0) begin : g_and
        assign nb[j][i] = 1'b0;                  // not used: a0*b0 has an AND
        assign pp[j][i] = a[i] & b[j];
      end else begin : g_nand
        assign nb[j][i] = ~(a[i] & b[j]);
        if ((i == N - 1) != (j == N - 1)) begin : g_negw
          assign pp[j][i] = nb[j][i];            // negative weight: NAND as is
        end else begin : g_posw
          assign pp[j][i] = ~nb[j][i];           // positive weight: complemented
        end
      end
    end
  end

  // carry-save rows: s[j][i] has weight i+j, c[j][i] weight i+j+1
  logic [N:0]   s [N];
  logic [N-1:0] c [N];

  always_comb begin
    s[0] = {1'b1, pp[0]};   // the correction 1 at column N enters here
    c[0] = '0;
  end

  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_cell
      full_adder u_fa (
        .x(pp[j][i]),
        .y(s[j-1][i+1]),
        .z(c[j-1][i]),
        .s(s[j][i]),
        .c(c[j][i])
      );
    end
    assign s[j][N] = 1'b0;
  end

  for (genvar j = 0; j < N; j++) begin : g_low
    assign prod[j] = s[j][0];
  end

  // final ripple row: weight N+k adds s[N-1][k+1] and c[N-1][k]
  logic [N-1:0] rc;   // rc[k]: carry into position k of the final row
  assign rc[0] = 1'b0;

  for (genvar k = 0; k < N - 1; k++) begin : g_final
    full_adder u_fa (
      .x(s[N-1][k+1]),
      .y(c[N-1][k]),
      .z(rc[k]),
      .s(prod[N+k]),
      .c(rc[k+1])
    );
  end

  // top bit: the remaining carry plus the ripple carry, then the inverter
  // that adds the correction 2^(2N-1)
  assign prod[2*N-1] = ~(c[N-1][N-1] ^ rc[N-1]);
endmodule
