// pp_generator: radix-8 Booth partial product generation.
//
// The m-bit signed multiplier p is cut into floor((m+2)/3) overlapping 4-bit
// windows (bit -1 is 0, bits above m-1 repeat the sign). Each window goes to
// a booth_encoder, whose select chooses 0, Q, 2Q, 3Q or 4Q from the signed
// n-bit multiplicand q, and whose NEG bit inverts the choice. 2Q and 4Q are
// shifts; the hard multiple 3Q = Q + 2Q is formed once, ahead of the
// multiplexers, with a carry lookahead adder. Each selected multiple is n+2
// bits wide.
//
// Two's complement completion and sign extension are handled without
// extending every row to full width:
//  * the "+1" of each negated row is collected into a separate NEG row, which
//    holds NEG_k at bit 3k (the positions never collide);
//  * the sign bit s_k of row k is replaced by its complement, and the sum
//    over all rows of -2^(n+1+3k) is added once as a constant row. This turns
//    each row's sign extension into a single bit.
// All rows are Y bits wide and sum, modulo 2^Y, to p*q.
//
// The radix-8 digits, the precomputed hard multiple, the n+2-bit multiplexers
// and the NEG bit follow the design. Collecting the NEG bits in one row and
// the complemented-sign / constant-row form of the sign extension are this
// implementation's choices (the design names per-row sign terms but does
// not give their encoding).
//
// Interface: p, q in; rows[0..G-1] are the shifted Booth rows, rows[G] the
// NEG row, rows[G+1] the constant row. Purely combinational.
module pp_generator
  import mult_pkg::*;
#(
  parameter int unsigned M = 32,   // multiplier width (operand P)
  parameter int unsigned N = 32,   // multiplicand width (operand Q)
  parameter int unsigned Y = 72,   // width of the rows (result width)
  localparam int unsigned G    = booth_digits(M),
  localparam int unsigned ROWS = G + 2
) (
  input  logic [M-1:0] p,
  input  logic [N-1:0] q,
  output logic [Y-1:0] rows [ROWS]
);
  localparam int unsigned MW = N + 2;       // width of one Booth multiple
  localparam int unsigned PE = 3 * G + 1;   // extended multiplier window

  // Sum over k of -2^(N+1+3k), modulo 2^Y.
  function automatic logic [Y-1:0] sign_constant();
    logic [Y-1:0] acc;
    acc = '0;
    for (int unsigned k = 0; k < G; k++) begin
      if (N + 1 + 3 * k < Y) acc = acc - (Y'(1) << (N + 1 + 3 * k));
    end
    return acc;
  endfunction

  localparam logic [Y-1:0] SIGN_CONST = sign_constant();

  logic [MW-1:0] q1;   // Q sign-extended
  logic [MW-1:0] q2;   // 2Q
  logic [MW-1:0] q3;   // 3Q (hard multiple)
  logic [MW-1:0] q4;   // 4Q
  logic [PE-1:0] pe;   // {sign extension, p, 1'b0}
  logic          q3_cout_unused;

  assign q1 = {{2{q[N-1]}}, q};
  assign q2 = q1 << 1;
  assign q4 = q1 << 2;
  assign pe = {{(PE - 1 - M){p[M-1]}}, p, 1'b0};

  cla_adder #(.W(MW)) u_hard_multiple (
    .x   (q1),
    .y   (q2),
    .cin (1'b0),
    .s   (q3),
    .cout(q3_cout_unused)
  );

  booth_sel_t    sel [G];
  logic [MW-1:0] mult [G];
  logic [G-1:0]  negs;

  for (genvar k = 0; k < G; k++) begin : g_digit
    booth_encoder u_enc (
      .b  (pe[3*k +: 4]),
      .sel(sel[k])
    );

    always_comb begin
      logic [MW-1:0] mag;
      logic [MW-1:0] row;
      mag = ({MW{sel[k].x1}} & q1) | ({MW{sel[k].x2}} & q2) |
            ({MW{sel[k].x3}} & q3) | ({MW{sel[k].x4}} & q4);
      row = mag ^ {MW{sel[k].neg}};
      // complement the sign bit; the constant row supplies the rest
      mult[k] = {~row[MW-1], row[MW-2:0]};
      negs[k] = sel[k].neg;
    end

    assign rows[k] = Y'(mult[k]) << (3 * k);
  end

  always_comb begin
    rows[G] = '0;
    for (int unsigned k = 0; k < G; k++) begin
      if (3 * k < Y) rows[G][3*k] = negs[k];
    end
  end

  assign rows[G+1] = SIGN_CONST;
endmodule
