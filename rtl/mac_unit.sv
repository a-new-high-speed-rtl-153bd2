// mac_unit: signed multiply-accumulate unit, R = P * Q + L.
//
// The datapath has the three steps of the multiplier:
//  1. partial product generation: radix-8 Booth recoding of the m-bit
//     multiplier P, with the hard multiple 3Q of the n-bit multiplicand Q
//     formed once ahead of the multiplexers (pp_generator);
//  2. partial product reduction: the Booth rows, the NEG row, the sign
//     constant row and the addend L enter a Wallace-style tree of 4:2
//     compressor rows and full adder rows that leaves two rows
//     (pp_reduction_tree);
//  3. final addition: a carry-select adder whose segments are carry
//     lookahead adders (final_adder).
// L is Y bits wide, Y > m + n. The result is written into the result
// register R, and the next operation may take that register back as its
// L (acc_mode = 1) instead of the l port, which makes the unit an
// accumulator. All arithmetic is two's complement modulo 2^Y.
//
// Timing. PIPE = 1 puts a register ("buffer") between the reduction tree and
// the final adder: an operation accepted on a rising edge with
// in_valid & in_ready is written into r at the following edge, and
// out_valid is high for the one cycle after that write (latency two edges,
// counting the accepting one). One operation can be accepted every cycle.
// PIPE = 0 removes the buffer: r is written at the accepting edge itself. With PIPE = 1 an accumulate
// (acc_mode = 1) that follows directly on another operation would read R
// before the earlier result is written, so in_ready drops for that cycle
// (one bubble). PIPE = 0 never stalls. rst_n is an active-low synchronous
// reset that clears R and the valid flags.
//
// The three steps, the counters they use and the R = P*Q + L operation
// with its stored result follow the design; the radix-8 choice, the widths
// of R and L, the buffer's default, the stall rule and the handshake are
// this implementation's choices.
module mac_unit
  import mult_pkg::*;
#(
  parameter int unsigned M    = 32,   // multiplier (P) width
  parameter int unsigned N    = 32,   // multiplicand (Q) width
  parameter int unsigned Y    = 72,   // width of L and R, Y > M + N
  parameter bit          PIPE = 1'b1  // register between tree and final adder
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [M-1:0] p,
  input  logic [N-1:0] q,
  input  logic [Y-1:0] l,
  input  logic         acc_mode,   // 1: L = R (accumulate), 0: L = l
  output logic         out_valid,
  output logic [Y-1:0] r
);
  localparam int unsigned G  = booth_digits(M);
  localparam int unsigned PR = G + 2;   // rows from the Booth generator
  localparam int unsigned TR = PR + 1;  // rows into the tree (with L)

  logic [Y-1:0] pp_rows   [PR];
  logic [Y-1:0] tree_rows [TR];
  logic [Y-1:0] tree_sum;
  logic [Y-1:0] tree_carry;
  logic [Y-1:0] fa_x;
  logic [Y-1:0] fa_y;
  logic [Y-1:0] fa_s;
  logic         fire;
  logic         fa_valid;   // operands at the final adder belong to an op

  // ---- step 1: partial product generation -------------------------------
  pp_generator #(.M(M), .N(N), .Y(Y)) u_ppg (
    .p   (p),
    .q   (q),
    .rows(pp_rows)
  );

  for (genvar i = 0; i < PR; i++) begin : g_rows
    assign tree_rows[i] = pp_rows[i];
  end
  assign tree_rows[PR] = acc_mode ? r : l;

  // ---- step 2: partial product reduction --------------------------------
  pp_reduction_tree #(.W(Y), .R(TR)) u_tree (
    .rows (tree_rows),
    .sum  (tree_sum),
    .carry(tree_carry)
  );

  // ---- optional buffer between reduction and final addition -------------
  if (PIPE) begin : g_buf
    logic [Y-1:0] sum_q;
    logic [Y-1:0] carry_q;
    logic         valid_q;

    always_ff @(posedge clk) begin
      if (!rst_n) valid_q <= 1'b0;
      else        valid_q <= fire;
      if (fire) begin
        sum_q   <= tree_sum;
        carry_q <= tree_carry;
      end
    end

    assign fa_x     = sum_q;
    assign fa_y     = carry_q;
    assign fa_valid = valid_q;
    // an accumulate must wait while the result it needs is in the buffer
    assign in_ready = ~(valid_q & acc_mode);
  end else begin : g_nobuf
    assign fa_x     = tree_sum;
    assign fa_y     = tree_carry;
    assign fa_valid = fire;
    assign in_ready = 1'b1;
  end

  assign fire = in_valid & in_ready;

  // ---- step 3: final addition --------------------------------------------
  final_adder #(.W(Y)) u_final (
    .x(fa_x),
    .y(fa_y),
    .s(fa_s)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= fa_valid;
      if (fa_valid) r <= fa_s;
    end
  end

  initial assert (Y > M + N) else $error("mac_unit: Y must exceed M + N");
endmodule
