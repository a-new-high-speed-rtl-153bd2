// tb_cla16: checks the 16-bit carry lookahead adder against the built-in
// addition, with edge operands (all ones, alternating bits, zero) and random
// operands, for both values of the carry-in.
module tb_cla16;
  logic [15:0] x, y, s;
  logic        cin, cout;
  int checks = 0;
  int failures = 0;

  cla16 dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  task automatic check();
    logic [16:0] expect_sum;
    #1;
    expect_sum = 17'(x) + 17'(y) + 17'(cin);
    checks++;
    if ({cout, s} != expect_sum) begin
      failures++;
      $display("FAIL %h + %h + %0b = %h, got %h", x, y, cin, expect_sum, {cout, s});
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
    logic [15:0] edges [6] = '{16'h0000, 16'hffff, 16'h5555, 16'haaaa, 16'h8000, 16'h0001};
    foreach (edges[i]) foreach (edges[j]) for (int c = 0; c < 2; c++) begin
      x = edges[i]; y = edges[j]; cin = 1'(c);
      check();
    end
    repeat (20000) begin
      x = 16'($urandom); y = 16'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
