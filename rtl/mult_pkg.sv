// mult_pkg: constants, types and elaboration-time helper functions shared by
// the Booth / Wallace / carry-select multiply-accumulate datapath.
//
// The functions below are evaluated while the design elaborates. They give
// the number of radix-8 Booth digits for an m-bit multiplier, the number of
// rows left after each level of the reduction tree, and the depth of that
// tree. None of them produces hardware.
package mult_pkg;

  // Width of one carry lookahead group (four 4-bit blocks, as drawn for the
  // final adder) and of one carry-select segment.
  localparam int unsigned CLA_GROUP = 16;

  // Radix-8 Booth digit magnitude selects plus the sign of the digit.
  typedef struct packed {
    logic neg;   // digit is negative: the selected multiple is inverted
    logic x1;    // |digit| == 1
    logic x2;    // |digit| == 2
    logic x3;    // |digit| == 3 (the precomputed hard multiple)
    logic x4;    // |digit| == 4
  } booth_sel_t;

  // Number of radix-8 Booth digits for a signed m-bit multiplier:
  // floor((m + 2) / 3).
  function automatic int unsigned booth_digits(int unsigned m);
    return (m + 2) / 3;
  endfunction

  // Rows left after one reduction level: each full group of four rows goes
  // through a row of 4:2 compressors, a remaining group of three through a
  // row of full adders, and one or two remaining rows are buffered.
  function automatic int unsigned next_rows(int unsigned r);
    int unsigned rem;
    rem = r % 4;
    return 2 * (r / 4) + ((rem == 3) ? 2 : rem);
  endfunction

  // Rows present at the input of level lvl of a tree that starts with r rows.
  function automatic int unsigned rows_at(int unsigned r, int unsigned lvl);
    int unsigned n;
    n = r;
    for (int unsigned i = 0; i < lvl; i++) n = next_rows(n);
    return n;
  endfunction

  // Number of levels needed to bring r rows down to two.
  function automatic int unsigned tree_levels(int unsigned r);
    int unsigned n;
    int unsigned lv;
    n  = r;
    lv = 0;
    while (n > 2) begin
      n  = next_rows(n);
      lv = lv + 1;
    end
    return lv;
  endfunction

  // Round a width up to a whole number of lookahead groups.
  function automatic int unsigned pad_to_group(int unsigned w);
    return ((w + CLA_GROUP - 1) / CLA_GROUP) * CLA_GROUP;
  endfunction

endpackage
