// tb_multiplier_top: end-to-end test of the whole design at its default
// parameters.
//
// The multiply-accumulate unit (32 x 32 bits, 72-bit result, buffer between
// reduction tree and final adder) receives a random stream of loads,
// R = P*Q + l, and accumulates, R = P*Q + R, with in_valid sometimes low.
// Results are compared with a 72-bit model, the latency (two edges from
// acceptance) is checked, and loads, accumulates, accumulate stalls,
// back-to-back operations overlapping in the buffer and negative products
// are counted; each must occur. Afterwards every 5 x 5 operand pair is
// applied to the NAND array multiplier and its product compared with the
// signed product.
module tb_multiplier_top;
  localparam int unsigned M = 32;
  localparam int unsigned N = 32;
  localparam int unsigned Y = 72;
  localparam int unsigned LAT = 2;
  localparam int unsigned OPS = 1500;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid = 1'b0;
  logic         in_ready;
  logic [M-1:0] p = '0;
  logic [N-1:0] q = '0;
  logic [Y-1:0] l = '0;
  logic         acc_mode = 1'b0;
  logic         out_valid;
  logic [Y-1:0] r;
  logic [4:0]   arr_a = '0;
  logic [4:0]   arr_b = '0;
  logic [9:0]   arr_prod;

  int checks = 0;
  int failures = 0;
  int n_load = 0, n_acc = 0, n_stall = 0, n_overlap = 0, n_negative = 0;
  longint cycle = 0;

  multiplier_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .p(p), .q(q), .l(l), .acc_mode(acc_mode), .out_valid(out_valid), .r(r),
    .arr_a(arr_a), .arr_b(arr_b), .arr_prod(arr_prod)
  );

  always #5 clk = ~clk;

  // operations accepted and not yet completed: issue cycle, operands
  typedef struct {
    longint       issued;
    logic [M-1:0] p;
    logic [N-1:0] q;
    logic [Y-1:0] l;
    logic         acc;
  } op_t;
  op_t pending [$];
  logic [Y-1:0] model_r = '0;   // the model's result register
  int completed = 0;
  logic last_fire = 1'b0;
  logic in_ready_seen = 1'b0;   // in_ready at the last rising edge

  always @(posedge clk) in_ready_seen <= in_ready;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      // completion: the result register was written at this edge's
      // previous step, so check what out_valid reports now
      if (out_valid) begin
        op_t o;
        logic [Y-1:0] expect_r;
        checks++;
        if (pending.size() == 0) begin
          failures++;
          $display("FAIL result with no operation pending");
        end else begin
          o = pending.pop_front();
          expect_r = Y'($signed(o.p)) * Y'($signed(o.q)) + (o.acc ? model_r : o.l);
          model_r = expect_r;
          completed++;
          if (r != expect_r) begin
            failures++;
            if (failures < 10) $display("FAIL op p=%h q=%h acc=%0b expect %h got %h",
                                        o.p, o.q, o.acc, expect_r, r);
          end
          checks++;
          if (cycle - o.issued != longint'(LAT)) begin
            failures++;
            $display("FAIL latency %0d, expected %0d", cycle - o.issued, LAT);
          end
        end
      end
      // acceptance at this edge
      if (in_valid && in_ready) begin
        pending.push_back('{issued: cycle, p: p, q: q, l: l, acc: acc_mode});
        if (acc_mode) n_acc++; else n_load++;
        if (last_fire) n_overlap++;
        if ($signed(p) * $signed(q) < 0) n_negative++;
      end
      if (in_valid && !in_ready) n_stall++;
      last_fire <= in_valid && in_ready;
    end
  end

  function automatic logic [M-1:0] pick(int unsigned sel);
    case (sel % 6)
      0: return 32'h80000000;
      1: return 32'hffffffff;
      2: return 32'h7fffffff;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < int'(OPS); ) begin
      @(negedge clk);
      // hold the offered operation until it is accepted
      if (!in_valid || in_ready_seen) begin
        in_valid = ($urandom_range(0, 4) != 0);
        p        = ($urandom_range(0, 9) == 0) ? pick($urandom) : $urandom;
        q        = ($urandom_range(0, 9) == 0) ? pick($urandom) : $urandom;
        l        = Y'({$urandom, $urandom, $urandom});
        acc_mode = ($urandom_range(0, 2) != 0);
        if (in_valid) i++;
      end
    end
    do @(negedge clk); while (!in_ready_seen);
    in_valid = 1'b0;
    repeat (10) @(negedge clk);

    checks++;
    if (completed != int'(OPS) || pending.size() != 0) begin
      failures++;
      $display("FAIL completed %0d of %0d operations", completed, OPS);
    end
    $display("loads=%0d accumulates=%0d stalls=%0d overlapped=%0d negative=%0d",
             n_load, n_acc, n_stall, n_overlap, n_negative);
    checks++;
    if (n_load == 0 || n_acc == 0 || n_negative == 0) begin
      failures++;
      $display("FAIL a load, an accumulate or a negative product never happened");
    end
    checks++;
    if (LAT == 2 && (n_stall == 0 || n_overlap == 0)) begin
      failures++;
      $display("FAIL no accumulate stall or no overlapped operation");
    end
    checks++;
    if (LAT == 1 && n_stall != 0) begin
      failures++;
      $display("FAIL unit stalled without a buffer");
    end
    // NAND array multiplier, all 5 x 5 operand pairs
    for (int x = -16; x < 16; x++) begin
      for (int y = -16; y < 16; y++) begin
        arr_a = 5'(x); arr_b = 5'(y);
        @(negedge clk);
        checks++;
        if ($signed(arr_prod) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL array %0d * %0d = %0d, got %0d", x, y, x * y, $signed(arr_prod));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
