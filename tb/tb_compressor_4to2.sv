// tb_compressor_4to2: exhaustive check of the 4:2 compressor.
// For all 32 input patterns it checks the counting identity
// i1+i2+i3+i4+cin = sum + 2*(carry+cout), and that cout does not depend on
// cin (the property that keeps a row of compressors free of rippling).
module tb_compressor_4to2;
  logic i1, i2, i3, i4, cin, sum, carry, cout;
  logic cout_c0;
  int   checks = 0;
  int   failures = 0;

  compressor_4to2 dut (.i1(i1), .i2(i2), .i3(i3), .i4(i4), .cin(cin),
                       .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {i1, i2, i3, i4} = 4'(v);
      for (int ci = 0; ci < 2; ci++) begin
        int total;
        cin = 1'(ci);
        #1;
        if (ci == 0) cout_c0 = cout;
        total = int'(i1) + int'(i2) + int'(i3) + int'(i4) + int'(cin);
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != total) begin
          failures++;
          $display("FAIL in=%04b cin=%0b -> sum=%0b carry=%0b cout=%0b",
                   {i1, i2, i3, i4}, cin, sum, carry, cout);
        end
        checks++;
        if (ci == 1 && cout != cout_c0) begin
          failures++;
          $display("FAIL cout depends on cin for in=%04b", {i1, i2, i3, i4});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
