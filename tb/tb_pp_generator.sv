// tb_pp_generator: checks the radix-8 Booth partial product generator at
// 32 x 32 bits. The rows it produces (Booth rows, NEG row, sign constant
// row) are summed in the testbench; the sum must equal the signed product
// p * q, sign-extended to 72 bits. Operands include the extremes (most
// negative, all ones, zero) and random values. It also counts how often the
// digits +-3 (the hard multiple 3Q) and +-4 occurred.
module tb_pp_generator;
  import mult_pkg::*;

  localparam int unsigned M = 32;
  localparam int unsigned N = 32;
  localparam int unsigned Y = 72;
  localparam int unsigned G = booth_digits(M);

  logic [M-1:0] p;
  logic [N-1:0] q;
  logic [Y-1:0] rows [G+2];
  int checks = 0;
  int failures = 0;
  int used3 = 0;
  int used4 = 0;

  pp_generator #(.M(M), .N(N), .Y(Y)) dut (.p(p), .q(q), .rows(rows));

  task automatic check();
    logic [Y-1:0] total;
    logic [Y-1:0] expect_prod;
    #1;
    total = '0;
    foreach (rows[i]) total = total + rows[i];
    expect_prod = Y'($signed(p)) * Y'($signed(q));
    // digit magnitudes, recomputed here from the multiplier bits
    for (int k = 0; k < int'(G); k++) begin
      int d, bm1, b0, b1, b2;
      bm1 = (k == 0) ? 0 : int'(p[3*k-1]);
      b0  = int'(p[3*k]);
      b1  = (3*k+1 < int'(M)) ? int'(p[3*k+1]) : int'(p[M-1]);
      b2  = (3*k+2 < int'(M)) ? int'(p[3*k+2]) : int'(p[M-1]);
      d   = -4 * b2 + 2 * b1 + b0 + bm1;
      if (d == 3 || d == -3) used3++;
      if (d == 4 || d == -4) used4++;
    end
    checks++;
    if (total != expect_prod) begin
      failures++;
      if (failures < 10) $display("FAIL p=%h q=%h expect %h got %h", p, q, expect_prod, total);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] edges [7] = '{32'h0, 32'h1, 32'hffffffff, 32'h80000000,
                               32'h7fffffff, 32'h55555555, 32'hb6db6db6};
    foreach (edges[i]) foreach (edges[j]) begin
      p = edges[i]; q = edges[j];
      check();
    end
    repeat (5000) begin
      p = $urandom; q = $urandom;
      check();
    end
    checks++;
    if (used3 == 0 || used4 == 0) begin
      failures++;
      $display("FAIL multiples 3Q/4Q never selected");
    end
    $display("3Q selected %0d times, 4Q selected %0d times", used3, used4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
