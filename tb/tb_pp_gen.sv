// tb_pp_gen: checks the partial-product generator at N = 4 (all 256 operand
// pairs) and N = 8 (random pairs). Every bit pp[j][i] is compared with
// x[i] & y[j], and the weighted sum of all bits with the integer product.
module tb_pp_gen;
  logic [3:0] x4, y4;
  logic [3:0][3:0] pp4;
  logic [7:0] x8, y8;
  logic [7:0][7:0] pp8;
  int checks = 0, failures = 0;

  pp_gen dut4 (.x(x4), .y(y4), .pp(pp4));
  pp_gen #(.N(8)) dut8 (.x(x8), .y(y8), .pp(pp8));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned acc;
    for (int v = 0; v < 256; v++) begin
      {x4, y4} = 8'(v);
      #1;
      acc = 0;
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (pp4[j][i] !== (x4[i] & y4[j])) begin
            failures++;
            $display("FAIL N=4 x=%0d y=%0d pp[%0d][%0d]=%0b", x4, y4, j, i, pp4[j][i]);
          end
          acc += longint'(pp4[j][i]) << (i + j);
        end
      checks++;
      if (acc != longint'(x4) * longint'(y4)) begin
        failures++;
        $display("FAIL N=4 x=%0d y=%0d weighted sum %0d", x4, y4, acc);
      end
    end
    for (int v = 0; v < 2000; v++) begin
      x8 = 8'($urandom);
      y8 = 8'($urandom);
      #1;
      acc = 0;
      for (int j = 0; j < 8; j++)
        for (int i = 0; i < 8; i++)
          acc += longint'(pp8[j][i]) << (i + j);
      checks++;
      if (acc != longint'(x8) * longint'(y8)) begin
        failures++;
        $display("FAIL N=8 x=%0d y=%0d weighted sum %0d", x8, y8, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
