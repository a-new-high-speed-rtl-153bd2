// multiplier_top: the two multipliers of the design, side by side.
//
//  * mac_unit: the high-speed signed multiply-accumulate unit,
//    R = P * Q + L, with radix-8 Booth partial product generation, a
//    Wallace-style tree of 4:2 compressors and full adders, a carry-select
//    final adder built from carry lookahead segments, and a result register
//    that can be fed back as L. Ports without prefix; see mac_unit for the
//    handshake and timing (result two clock edges after acceptance with the
//    default buffer between tree and final adder).
//  * nand_array_multiplier: a small combinational two's complement array
//    multiplier whose partial product bits come from NAND gates (ports
//    arr_a, arr_b, arr_prod; 5 x 5 bits by default).
// The two share no signals; each keeps its own ports. Parameter defaults
// are those of the two units.
module multiplier_top #(
  parameter int unsigned M       = 32,
  parameter int unsigned N       = 32,
  parameter int unsigned Y       = 72,
  parameter bit          PIPE    = 1'b1,
  parameter int unsigned ARRAY_N = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [M-1:0]         p,
  input  logic [N-1:0]         q,
  input  logic [Y-1:0]         l,
  input  logic                 acc_mode,
  output logic                 out_valid,
  output logic [Y-1:0]         r,
  input  logic [ARRAY_N-1:0]   arr_a,
  input  logic [ARRAY_N-1:0]   arr_b,
  output logic [2*ARRAY_N-1:0] arr_prod
);
  mac_unit #(.M(M), .N(N), .Y(Y), .PIPE(PIPE)) u_mac (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .p        (p),
    .q        (q),
    .l        (l),
    .acc_mode (acc_mode),
    .out_valid(out_valid),
    .r        (r)
  );

  nand_array_multiplier #(.N(ARRAY_N)) u_array (
    .a   (arr_a),
    .b   (arr_b),
    .prod(arr_prod)
  );
endmodule
