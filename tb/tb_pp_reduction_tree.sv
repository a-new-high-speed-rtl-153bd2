// tb_pp_reduction_tree: checks the compressor / full adder tree. Three trees
// are built: 14 rows of 72 bits (the size the 32 x 32 multiply-accumulate
// uses: 4:2 rows at every level), 7 rows (a full adder row and a buffered
// row appear) and 2 rows (no level at all). For random rows, sum + carry
// must equal the sum of all rows modulo 2^W.
module tb_pp_reduction_tree;
  localparam int unsigned W = 72;

  logic [W-1:0] r14 [14];
  logic [W-1:0] r7  [7];
  logic [W-1:0] r2  [2];
  logic [W-1:0] s14, c14, s7, c7, s2, c2;
  int checks = 0;
  int failures = 0;

  pp_reduction_tree #(.W(W), .R(14)) dut14 (.rows(r14), .sum(s14), .carry(c14));
  pp_reduction_tree #(.W(W), .R(7))  dut7  (.rows(r7),  .sum(s7),  .carry(c7));
  pp_reduction_tree #(.W(W), .R(2))  dut2  (.rows(r2),  .sum(s2),  .carry(c2));

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    v = W'({$urandom, $urandom, $urandom});
    case ($urandom_range(0, 3))
      0: v = '1;
      1: v = v & {W{1'b1}} >> $urandom_range(0, W - 1);
      default: ;
    endcase
    return v;
  endfunction

  task automatic compare(string name, logic [W-1:0] got, logic [W-1:0] expect_sum);
    checks++;
    if (got != expect_sum) begin
      failures++;
      if (failures < 10) $display("FAIL %s expect %h got %h", name, expect_sum, got);
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
    repeat (3000) begin
      logic [W-1:0] t14, t7, t2;
      t14 = '0; t7 = '0; t2 = '0;
      foreach (r14[i]) begin r14[i] = rnd(); t14 += r14[i]; end
      foreach (r7[i])  begin r7[i]  = rnd(); t7  += r7[i];  end
      foreach (r2[i])  begin r2[i]  = rnd(); t2  += r2[i];  end
      #1;
      compare("R=14", s14 + c14, t14);
      compare("R=7",  s7 + c7,   t7);
      compare("R=2",  s2 + c2,   t2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
