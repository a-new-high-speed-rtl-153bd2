// tb_full_adder: exhaustive check of the one-bit full adder.
// All eight input combinations are applied; sum and carry are compared with
// the arithmetic count of ones among the inputs.
module tb_full_adder;
  logic x, y, z, s, c;
  int   checks = 0;
  int   failures = 0;

  full_adder dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {x, y, z} = 3'(v);
      #1;
      ones = int'(x) + int'(y) + int'(z);
      checks++;
      if ({c, s} != 2'(ones)) begin
        failures++;
        $display("FAIL x=%0b y=%0b z=%0b -> c=%0b s=%0b", x, y, z, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
