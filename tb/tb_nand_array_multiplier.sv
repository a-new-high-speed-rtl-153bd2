// tb_nand_array_multiplier: exhaustive check of the NAND-based two's
// complement array multiplier at the drawn size (5 x 5 bits) and at 8 x 8
// bits. Every operand pair is applied and the product is compared with the
// signed product computed by the testbench.
module tb_nand_array_multiplier;
  logic [4:0]  a5, b5;
  logic [9:0]  p5;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int checks = 0;
  int failures = 0;

  nand_array_multiplier #(.N(5)) dut5 (.a(a5), .b(b5), .prod(p5));
  nand_array_multiplier #(.N(8)) dut8 (.a(a8), .b(b8), .prod(p8));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -16; x < 16; x++) begin
      for (int y = -16; y < 16; y++) begin
        a5 = 5'(x); b5 = 5'(y);
        #1;
        checks++;
        if ($signed(p5) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL 5x5 %0d * %0d = %0d, got %0d", x, y, x * y, $signed(p5));
        end
      end
    end
    for (int x = -128; x < 128; x++) begin
      for (int y = -128; y < 128; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if ($signed(p8) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL 8x8 %0d * %0d = %0d, got %0d", x, y, x * y, $signed(p8));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
