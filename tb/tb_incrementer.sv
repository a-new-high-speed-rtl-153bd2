// tb_incrementer: exhaustive check of the 16-bit "+1" chain: for every input
// the sum must be x + 1 (mod 2^16) and all_ones must flag x == 16'hffff.
module tb_incrementer;
  logic [15:0] x, s;
  logic        all_ones;
  int checks = 0;
  int failures = 0;

  incrementer #(.W(16)) dut (.x(x), .s(s), .all_ones(all_ones));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      x = 16'(v);
      #1;
      checks++;
      if (s != 16'(v + 1) || all_ones != (v == 65535)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h s=%h all_ones=%0b", x, s, all_ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
