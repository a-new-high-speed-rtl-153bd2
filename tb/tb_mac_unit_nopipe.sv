// tb_mac_unit_nopipe: end-to-end test of the multiply-accumulate unit without
// the buffer between the reduction tree and the final adder (PIPE = 0), at
// 32 x 32 bits with a 72-bit result. Same stimulus and model as tb_mac_unit;
// here the latency is one edge and the unit must never stall.
//
// A random stream of operations is offered, with in_valid sometimes low.
// Each operation is either a load, R = P*Q + l, or an accumulate,
// R = P*Q + R. The expected results come from a model that multiplies the
// sign-extended operands in 72-bit arithmetic. The test also checks the
// latency (result two edges after acceptance with the buffer, one without),
// and counts the mechanisms of the unit: loads, accumulates, accumulate
// stalls (an accumulate directly behind another operation), back-to-back
// operations overlapping in the buffer, and products that are negative.
// Each must occur at least once.
module tb_mac_unit_nopipe;
  localparam int unsigned M = 32;
  localparam int unsigned N = 32;
  localparam int unsigned Y = 72;
  localparam int unsigned LAT = 1;
  localparam int unsigned OPS = 3000;

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

  int checks = 0;
  int failures = 0;
  int n_load = 0, n_acc = 0, n_stall = 0, n_overlap = 0, n_negative = 0;
  longint cycle = 0;

  mac_unit #(.PIPE(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .p(p), .q(q), .l(l), .acc_mode(acc_mode), .out_valid(out_valid), .r(r)
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
