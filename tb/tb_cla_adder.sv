// tb_cla_adder: checks the chained carry lookahead adder at two widths: 34
// bits (the hard-multiple adder of a 32-bit multiplicand, a partly filled
// last group) and 32 bits (whole groups). Sum and carry-out are compared
// with the built-in addition for edge and random operands.
module tb_cla_adder;
  logic [33:0] x34, y34, s34;
  logic [31:0] x32, y32, s32;
  logic        cin, co34, co32;
  int checks = 0;
  int failures = 0;

  cla_adder #(.W(34)) dut34 (.x(x34), .y(y34), .cin(cin), .s(s34), .cout(co34));
  cla_adder #(.W(32)) dut32 (.x(x32), .y(y32), .cin(cin), .s(s32), .cout(co32));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [34:0] e34;
      logic [32:0] e32;
      case (i % 4)
        0: begin x34 = '1; y34 = 34'($urandom_range(0, 2)); end
        1: begin x34 = {2'($urandom), $urandom}; y34 = ~x34; end
        default: begin x34 = {2'($urandom), $urandom}; y34 = {2'($urandom), $urandom}; end
      endcase
      x32 = x34[31:0];
      y32 = y34[31:0];
      cin = 1'($urandom);
      #1;
      e34 = 35'(x34) + 35'(y34) + 35'(cin);
      e32 = 33'(x32) + 33'(y32) + 33'(cin);
      checks += 2;
      if ({co34, s34} != e34) begin
        failures++;
        if (failures < 10) $display("FAIL W=34 %h + %h + %0b", x34, y34, cin);
      end
      if ({co32, s32} != e32) begin
        failures++;
        if (failures < 10) $display("FAIL W=32 %h + %h + %0b", x32, y32, cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
