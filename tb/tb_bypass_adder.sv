// tb_bypass_adder: exhaustive check of the bypassable adder cell. With
// bypass = 0 the cell must add a+s_in+c_in; with bypass = 1 it must pass
// s_in to sum, give cout = 0, and hold the inner full adder's inputs at 0
// (operand isolation, checked through the cell's internal nets).
module tb_bypass_adder;
  logic a, s_in, c_in, bypass, sum, cout;
  int checks = 0, failures = 0;

  bypass_adder dut (.a(a), .s_in(s_in), .c_in(c_in), .bypass(bypass),
                    .sum(sum), .cout(cout));

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] expect_v;
    for (int v = 0; v < 16; v++) begin
      {bypass, a, s_in, c_in} = 4'(v);
      #1;
      expect_v = bypass ? {1'b0, s_in} : 2'(int'(a) + int'(s_in) + int'(c_in));
      checks++;
      if ({cout, sum} != expect_v) begin
        failures++;
        $display("FAIL byp=%0b a=%0b s=%0b c=%0b -> cout=%0b sum=%0b", bypass, a, s_in, c_in, cout, sum);
      end
      if (bypass) begin
        checks++;
        if ({dut.a_g, dut.s_g, dut.c_g} != 3'b000) begin
          failures++;
          $display("FAIL inner adder inputs not isolated in bypass (a=%0b s=%0b c=%0b)", a, s_in, c_in);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
