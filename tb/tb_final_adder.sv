// tb_final_adder: checks the 72-bit carry-select final adder against the
// built-in addition. Besides random operands it uses cases in which a carry
// has to cross several 16-bit segments (one operand all ones, or segments
// that sum to all ones), so the select chain and the incrementers are used.
module tb_final_adder;
  localparam int unsigned W = 72;

  logic [W-1:0] x, y, s;
  int checks = 0;
  int failures = 0;
  int crossings = 0;

  final_adder #(.W(W)) dut (.x(x), .y(y), .s(s));

  function automatic logic [W-1:0] rnd();
    return W'({$urandom, $urandom, $urandom});
  endfunction

  task automatic check();
    logic [W-1:0] expect_sum;
    #1;
    expect_sum = x + y;
    checks++;
    // a carry that enters segment 1 while its plain sum is all ones
    if ((x[15:0] + y[15:0]) > 17'hffff && (x[31:16] + y[31:16]) == 16'hffff) crossings++;
    if (s != expect_sum) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h, got %h", x, y, expect_sum, s);
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
    x = '1; y = W'(1); check();
    x = '1; y = '1;    check();
    x = '0; y = '0;    check();
    for (int i = 0; i < 2000; i++) begin
      x = rnd();
      y = ~x + W'($urandom_range(0, 3));   // sums near 2^W: long carries
      check();
      x = rnd();
      y = rnd();
      if (i % 2 == 0) y[W-1:16] = ~x[W-1:16];   // segments that sum to all ones
      check();
    end
    checks++;
    if (crossings == 0) begin
      failures++;
      $display("FAIL no carry crossed an all-ones segment");
    end
    $display("carry crossings through all-ones segments: %0d", crossings);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
