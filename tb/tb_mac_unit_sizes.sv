// tb_mac_unit_sizes: the multiply-accumulate unit at the other operand sizes
// the multiplier is compared at: 48 x 48, 54 x 54 and 64 x 64 bits, each with
// a result eight bits wider than the product. Every unit receives the same
// pattern: a load of P*Q + L followed by accumulates of further products,
// with extreme and random operands; the results are compared with a model
// in wide arithmetic. The number of Booth rows (16, 18 and 22) and the
// resulting tree depth follow from the parameters.
module tb_mac_unit_sizes;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one unit under test with its own driver and model
  `define MAC_SIZE_TEST(NAME, W, YW)                                             \
  logic          NAME``_valid = 1'b0, NAME``_ready, NAME``_acc = 1'b0;           \
  logic          NAME``_ovalid;                                                  \
  logic [W-1:0]  NAME``_p = '0, NAME``_q = '0;                                   \
  logic [YW-1:0] NAME``_l = '0, NAME``_r;                                        \
  mac_unit #(.M(W), .N(W), .Y(YW)) NAME (                                        \
    .clk(clk), .rst_n(rst_n), .in_valid(NAME``_valid), .in_ready(NAME``_ready),  \
    .p(NAME``_p), .q(NAME``_q), .l(NAME``_l), .acc_mode(NAME``_acc),             \
    .out_valid(NAME``_ovalid), .r(NAME``_r));

  `MAC_SIZE_TEST(u48, 48, 104)
  `MAC_SIZE_TEST(u54, 54, 116)
  `MAC_SIZE_TEST(u64, 64, 136)

  function automatic logic [63:0] operand(int unsigned sel);
    case (sel % 5)
      0: return 64'h8000_0000_0000_0000;
      1: return '1;
      default: return {$urandom, $urandom};
    endcase
  endfunction

  // drive one operation into all three units (one at a time, no overlap)
  task automatic run_op(logic [63:0] a, logic [63:0] b, logic [135:0] add, logic acc);
    u48_p = a[47:0]; u48_q = b[47:0]; u48_l = add[103:0]; u48_acc = acc;
    u54_p = a[53:0]; u54_q = b[53:0]; u54_l = add[115:0]; u54_acc = acc;
    u64_p = a;       u64_q = b;       u64_l = add;        u64_acc = acc;
    u48_valid = 1'b1; u54_valid = 1'b1; u64_valid = 1'b1;
    @(negedge clk);
    u48_valid = 1'b0; u54_valid = 1'b0; u64_valid = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    logic [103:0] m48;
    logic [115:0] m54;
    logic [135:0] m64;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    m48 = '0; m54 = '0; m64 = '0;
    for (int i = 0; i < 400; i++) begin
      logic [63:0]  a, b;
      logic [135:0] add;
      logic         acc;
      a   = operand($urandom);
      b   = operand($urandom);
      add = 136'({$urandom, $urandom, $urandom, $urandom, $urandom});
      acc = (i % 8 != 0);
      run_op(a, b, add, acc);
      m48 = 104'($signed(a[47:0])) * 104'($signed(b[47:0])) + (acc ? m48 : add[103:0]);
      m54 = 116'($signed(a[53:0])) * 116'($signed(b[53:0])) + (acc ? m54 : add[115:0]);
      m64 = 136'($signed(a))       * 136'($signed(b))       + (acc ? m64 : add);
      checks += 3;
      if (u48_r != m48) begin failures++; $display("FAIL 48x48 op %0d", i); end
      if (u54_r != m54) begin failures++; $display("FAIL 54x54 op %0d", i); end
      if (u64_r != m64) begin failures++; $display("FAIL 64x64 op %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
