// cla16: 16-bit carry lookahead adder built from four 4-bit adder blocks.
//
// Each cla_block4 reports a group propagate P_k and generate G_k. The block
// carries are produced by AND-OR lookahead logic, block by block as drawn for
// the final adder: C1 = G0 | P0&Cin, C2 = G1 | P1&C1,
// C3 = G2 | P2&G1 | P2&P1&C1, Cout = G3 | P3&C3. The four blocks and their
// P/G signals follow the design; these equations are this implementation's
// reading of its drawn gate tree. Interface: x, y, cin in; s, cout out.
// Purely combinational.
module cla16 (
  input  logic [15:0] x,
  input  logic [15:0] y,
  input  logic        cin,
  output logic [15:0] s,
  output logic        cout
);
  logic [3:0] gp;
  logic [3:0] gg;
  logic [3:0] c;   // carry into each 4-bit block

  for (genvar k = 0; k < 4; k++) begin : g_blk
    cla_block4 u_blk (
      .x  (x[4*k +: 4]),
      .y  (y[4*k +: 4]),
      .cin(c[k]),
      .s  (s[4*k +: 4]),
      .gp (gp[k]),
      .gg (gg[k])
    );
  end

  always_comb begin
    c[0] = cin;
    c[1] = gg[0] | (gp[0] & cin);
    c[2] = gg[1] | (gp[1] & c[1]);
    c[3] = gg[2] | (gp[2] & gg[1]) | (gp[2] & gp[1] & c[1]);
    cout = gg[3] | (gp[3] & c[3]);
  end
endmodule
