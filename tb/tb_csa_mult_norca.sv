// tb_csa_mult_norca: checks the no-final-adder carry-save multiplier against
// the integer product x*y. N = 2, 3, 4 (the default) and 8 are checked over
// all operand pairs, N = 16 over random pairs. For N = 4 it also counts how
// often a last-row carry of 1 enters a free input (the path that replaces
// the final adder) and how often the product MSB comes from the last carry;
// a path never exercised counts as a failure. The forwarded carries are
// taken from a bit-level reference model of the array in this testbench.
module tb_csa_mult_norca;
  logic [1:0]  x2, y2;   logic [3:0]  p2;
  logic [2:0]  x3, y3;   logic [5:0]  p3;
  logic [3:0]  x4, y4;   logic [7:0]  p4;
  logic [7:0]  x8, y8;   logic [15:0] p8;
  logic [15:0] x16, y16; logic [31:0] p16;
  int checks = 0, failures = 0;
  int fwd_carry[3];
  int msb_set = 0;

  // Bit-level reference of the 4x4 array, written from the cell equations:
  // returns the three forwarded last-row carries {F5,F4,F3}.
  function automatic logic [2:0] fwd_carries(logic [3:0] x, logic [3:0] y);
    logic s[1:3][0:3];
    logic c[1:3][0:3];
    logic [2:0] f;
    logic a, b, ci;
    f = '0;
    // weights are processed in increasing order so forwarded carries exist
    for (int w = 1; w <= 6; w++)
      for (int r = 1; r <= 3; r++) begin
        int i;
        i = w - r;
        if (i < 0 || i > 3) continue;
        a  = x[i] & y[r];
        b  = (i == 3) ? f[r-1] : ((r == 1) ? (x[i+1] & y[0]) : s[r-1][i+1]);
        ci = (r == 1) ? 1'b0 : c[r-1][i];
        s[r][i] = a ^ b ^ ci;
        c[r][i] = (a & b) | (a & ci) | (b & ci);
        if (r == 3 && i < 3) f[i] = c[r][i];
      end
    return f;
  endfunction

  csa_mult_norca #(.N(2))  dut2  (.x(x2),  .y(y2),  .p(p2));
  csa_mult_norca #(.N(3))  dut3  (.x(x3),  .y(y3),  .p(p3));
  csa_mult_norca           dut4  (.x(x4),  .y(y4),  .p(p4));
  csa_mult_norca #(.N(8))  dut8  (.x(x8),  .y(y8),  .p(p8));
  csa_mult_norca #(.N(16)) dut16 (.x(x16), .y(y16), .p(p16));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x4 = 0; y4 = 0; x8 = 0; y8 = 0; x16 = 0; y16 = 0;
    for (int v = 0; v < 16; v++) begin
      {x2, y2} = 4'(v);
      {x3, y3} = 6'(v);
      #1;
      checks++;
      if (p2 != 4'(x2 * y2)) begin failures++; $display("FAIL N=2 %0d*%0d=%0d", x2, y2, p2); end
    end
    for (int v = 0; v < 64; v++) begin
      {x3, y3} = 6'(v);
      #1;
      checks++;
      if (p3 != 6'(x3 * y3)) begin failures++; $display("FAIL N=3 %0d*%0d=%0d", x3, y3, p3); end
    end
    for (int v = 0; v < 256; v++) begin
      {x4, y4} = 8'(v);
      #1;
      checks++;
      if (p4 != 8'(x4 * y4)) begin failures++; $display("FAIL N=4 %0d*%0d=%0d", x4, y4, p4); end
      for (int k = 0; k < 3; k++) if (fwd_carries(x4, y4)[k]) fwd_carry[k]++;
      if (p4[7]) msb_set++;
    end
    for (int v = 0; v < 65536; v++) begin
      {x8, y8} = 16'(v);
      #1;
      checks++;
      if (p8 != 16'(x8 * y8)) begin failures++; $display("FAIL N=8 %0d*%0d=%0d", x8, y8, p8); end
    end
    for (int v = 0; v < 20000; v++) begin
      x16 = 16'($urandom);
      y16 = 16'($urandom);
      if (v == 0) begin x16 = '1; y16 = '1; end
      #1;
      checks++;
      if (p16 != 32'(x16) * 32'(y16)) begin failures++; $display("FAIL N=16 %0d*%0d=%0d", x16, y16, p16); end
    end
    for (int k = 0; k < 3; k++) begin
      $display("N=4: last-row carry of weight %0d forwarded as 1 in %0d of 256 products", k + 3, fwd_carry[k]);
      checks++;
      if (fwd_carry[k] == 0) begin failures++; $display("FAIL forwarded carry %0d never 1", k); end
    end
    $display("N=4: MSB taken from the final carry in %0d of 256 products", msb_set);
    checks++;
    if (msb_set == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
