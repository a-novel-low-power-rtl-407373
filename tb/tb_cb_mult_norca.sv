// tb_cb_mult_norca: checks the column-bypassing no-final-adder multiplier.
// The product is compared with x*y for all operand pairs at N = 4 (default)
// and N = 8 and random pairs at N = 16; col_bypass must equal ~x.
// For N = 4 it also checks, through the array's internal nets, that every
// cell of a bypassed column sees a carry input of 0 (what makes the bypass
// exact), counts bypass events per column and all-columns-bypassed cases, and
// counts bypasses of the leftmost column while a forwarded last-row carry of 1
// is passing through it. Each event must occur at least once.
module tb_cb_mult_norca;
  logic [3:0]  x4, y4;   logic [7:0]  p4;  logic [3:0]  b4;
  logic [7:0]  x8, y8;   logic [15:0] p8;  logic [7:0]  b8;
  logic [15:0] x16, y16; logic [31:0] p16; logic [15:0] b16;
  int checks = 0, failures = 0;
  int col_byp[4];
  int all_byp = 0, fwd_through = 0;

  cb_mult_norca           dut4  (.x(x4),  .y(y4),  .p(p4),  .col_bypass(b4));
  cb_mult_norca #(.N(8))  dut8  (.x(x8),  .y(y8),  .p(p8),  .col_bypass(b8));
  cb_mult_norca #(.N(16)) dut16 (.x(x16), .y(y16), .p(p16), .col_bypass(b16));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] cin_c0, cin_c1, cin_c2, cin_c3;
    logic [2:0] fwd_c3;
    x8 = 0; y8 = 0; x16 = 0; y16 = 0;
    for (int v = 0; v < 256; v++) begin
      {x4, y4} = 8'(v);
      #1;
      checks++;
      if (p4 != 8'(x4 * y4)) begin failures++; $display("FAIL N=4 %0d*%0d=%0d", x4, y4, p4); end
      checks++;
      if (b4 != ~x4) begin failures++; $display("FAIL N=4 x=%0d col_bypass=%b", x4, b4); end
      cin_c0 = {dut4.g_row[3].g_col[0].c_in, dut4.g_row[2].g_col[0].c_in, dut4.g_row[1].g_col[0].c_in};
      cin_c1 = {dut4.g_row[3].g_col[1].c_in, dut4.g_row[2].g_col[1].c_in, dut4.g_row[1].g_col[1].c_in};
      cin_c2 = {dut4.g_row[3].g_col[2].c_in, dut4.g_row[2].g_col[2].c_in, dut4.g_row[1].g_col[2].c_in};
      cin_c3 = {dut4.g_row[3].g_col[3].c_in, dut4.g_row[2].g_col[3].c_in, dut4.g_row[1].g_col[3].c_in};
      fwd_c3 = {dut4.g_row[3].g_col[3].s_in, dut4.g_row[2].g_col[3].s_in, dut4.g_row[1].g_col[3].s_in};
      if (!x4[0]) begin col_byp[0]++; checks++; if (cin_c0 != 0) begin failures++; $display("FAIL col0 carry in bypass"); end end
      if (!x4[1]) begin col_byp[1]++; checks++; if (cin_c1 != 0) begin failures++; $display("FAIL col1 carry in bypass"); end end
      if (!x4[2]) begin col_byp[2]++; checks++; if (cin_c2 != 0) begin failures++; $display("FAIL col2 carry in bypass"); end end
      if (!x4[3]) begin col_byp[3]++; checks++; if (cin_c3 != 0) begin failures++; $display("FAIL col3 carry in bypass"); end end
      if (x4 == 0) all_byp++;
      if (!x4[3] && fwd_c3 != 0) fwd_through++;
    end
    for (int v = 0; v < 65536; v++) begin
      {x8, y8} = 16'(v);
      #1;
      checks++;
      if (p8 != 16'(x8 * y8) || b8 != ~x8) begin failures++; $display("FAIL N=8 %0d*%0d=%0d", x8, y8, p8); end
    end
    for (int v = 0; v < 20000; v++) begin
      x16 = 16'($urandom);
      y16 = 16'($urandom);
      if (v == 0) begin x16 = '1; y16 = '1; end
      if (v % 4 == 1) x16 &= 16'($urandom);   // more zero bits, more bypassing
      #1;
      checks++;
      if (p16 != 32'(x16) * 32'(y16) || b16 != ~x16) begin
        failures++; $display("FAIL N=16 %0d*%0d=%0d", x16, y16, p16);
      end
    end
    for (int k = 0; k < 4; k++) begin
      $display("N=4: column %0d bypassed in %0d of 256 products", k, col_byp[k]);
      checks++;
      if (col_byp[k] == 0) failures++;
    end
    $display("N=4: all columns skipped in %0d products", all_byp);
    $display("N=4: forwarded carry passed through bypassed column 3 in %0d products", fwd_through);
    checks += 2;
    if (all_byp == 0) failures++;
    if (fwd_through == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
