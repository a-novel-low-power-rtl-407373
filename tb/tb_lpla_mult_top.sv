// tb_lpla_mult_top: end-to-end test of the top at its default size (4x4).
// Both multipliers are driven with every one of the 256 operand pairs; the
// plain array gets (x,y) and the bypass array (y,x) at the same time, so the
// two sides see different operands. Each product is compared with the integer
// product and the bypass flags with the multiplicand's zero bits. It counts
// how often each mechanism of the design fires and fails if one never does:
//   - a last-row carry forwarded into a free input (replaces the final adder),
//   - the product MSB produced by the final carry,
//   - each column of the bypass array skipped,
//   - a forwarded carry passed through a skipped leftmost column.
// Forwarded carries come from a bit-level reference model of the array in
// this testbench.
module tb_lpla_mult_top;
  localparam int N = 4;
  logic [N-1:0]   a_x, a_y, b_x, b_y, b_bypass;
  logic [2*N-1:0] a_p, b_p;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_msb = 0, n_fwd_byp = 0;
  int n_byp[N];

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

  lpla_mult_top dut (.a_x(a_x), .a_y(a_y), .a_p(a_p),
                     .b_x(b_x), .b_y(b_y), .b_p(b_p), .b_bypass(b_bypass));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a_x, a_y} = 8'(v);
      b_x = a_y;
      b_y = a_x;
      #1;
      checks += 3;
      if (a_p != 8'(a_x * a_y)) begin failures++; $display("FAIL array %0d*%0d=%0d", a_x, a_y, a_p); end
      if (b_p != 8'(b_x * b_y)) begin failures++; $display("FAIL bypass %0d*%0d=%0d", b_x, b_y, b_p); end
      if (b_bypass != ~b_x)     begin failures++; $display("FAIL bypass flags x=%0d %b", b_x, b_bypass); end
      if (fwd_carries(a_x, a_y) != 0) n_fwd++;
      if (a_p[2*N-1]) n_msb++;
      for (int i = 0; i < N; i++) if (b_bypass[i]) n_byp[i]++;
      if (b_bypass[N-1] && fwd_carries(b_x, b_y) != 0) n_fwd_byp++;
    end
    $display("forwarded last-row carry: %0d, MSB from final carry: %0d, carry through skipped column: %0d",
             n_fwd, n_msb, n_fwd_byp);
    checks += 3;
    if (n_fwd == 0) failures++;
    if (n_msb == 0) failures++;
    if (n_fwd_byp == 0) failures++;
    for (int i = 0; i < N; i++) begin
      $display("column %0d skipped: %0d", i, n_byp[i]);
      checks++;
      if (n_byp[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
