// tb_booth_encoder: exhaustive check of the radix-8 Booth digit encoder.
// For each of the 16 windows the digit -4*b3 + 2*b2 + b1 + b0 is computed
// arithmetically and compared with the encoder's one-hot magnitude and sign.
module tb_booth_encoder;
  import mult_pkg::*;

  logic [3:0] b;
  booth_sel_t sel;
  int checks = 0;
  int failures = 0;

  booth_encoder dut (.b(b), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int d, mag, got;
      b = 4'(v);
      #1;
      d   = -4 * int'(b[3]) + 2 * int'(b[2]) + int'(b[1]) + int'(b[0]);
      mag = (d < 0) ? -d : d;
      got = int'(sel.x1) * 1 + int'(sel.x2) * 2 + int'(sel.x3) * 3 + int'(sel.x4) * 4;
      checks++;
      if ((int'(sel.x1) + int'(sel.x2) + int'(sel.x3) + int'(sel.x4)) > 1 ||
          got != mag || sel.neg != (d < 0)) begin
        failures++;
        $display("FAIL b=%04b digit=%0d sel=%b", b, d, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
