// csa_mult_norca: N x N unsigned carry-save array multiplier without a final
// carry-propagate adder.
//
// The array has N-1 rows of N full adders. Cell (r,i) (row r = 1..N-1,
// array column i = 0..N-1) sits at product weight r+i and adds
//   - its partial product x[i]&y[r],
//   - the sum coming down from cell (r-1,i+1) (row 1 takes x[i+1]&y[0]),
//   - the carry coming down from cell (r-1,i) (row 1 takes 0),
// so carries are saved and passed diagonally to the next row exactly as in a
// conventional carry-save multiplier. The conventional design would now merge
// the last row's sums and carries in an N-bit ripple-carry adder. Here that
// adder does not exist: the leftmost cell of every row (i = N-1) has no sum
// coming from above, and that free input takes the carry of the last-row cell
// one weight lower. For N = 4 the last-row carries of weights 3, 4 and 5 enter
// the free inputs at weights 4, 5 and 6, and the carry of the weight-6 cell is
// the product MSB. N full adders are saved against the conventional array.
//
// Which free input receives which carry is this implementation's reading of
// the scheme: one free input exists per weight N..2N-2, one per row, and
// feeding each with the next-lower last-row carry gives an exact product with
// no combinational loop (signals only flow to equal or higher weights).
//
// Product bits: p[0] = x0&y0, p[r] = sum of cell (r,0) for r < N,
// p[N-1+i] = sum of last-row cell i, p[2N-1] = carry of the last-row cell
// N-1. Purely combinational; the result is valid one array delay after the
// operands change. N defaults to 4; any N >= 2 works.
module csa_mult_norca #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   x,   // multiplicand
  input  logic [N-1:0]   y,   // multiplier
  output logic [2*N-1:0] p    // product x*y
);
  if (N < 2) begin : g_bad_n
    $error("csa_mult_norca needs N >= 2");
  end

  logic [N-1:0][N-1:0] pp;

  pp_gen #(.N(N)) u_pp (.x(x), .y(y), .pp(pp));

  for (genvar r = 1; r < N; r++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic s_in, c_in, s, c;

      if (i == N-1) begin : g_free
        // free input of the leftmost cell: carry of the last-row cell one
        // weight below (weight r+N-2 is last-row column r-1)
        assign s_in = g_row[N-1].g_col[r-1].c;
      end else if (r == 1) begin : g_first
        assign s_in = pp[0][i+1];
      end else begin : g_sum
        assign s_in = g_row[r-1].g_col[i+1].s;
      end

      if (r == 1) begin : g_c0
        assign c_in = 1'b0;
      end else begin : g_cd
        assign c_in = g_row[r-1].g_col[i].c;
      end

      full_adder u_fa (.a(pp[r][i]), .b(s_in), .cin(c_in), .sum(s), .cout(c));
    end
  end

  assign p[0] = pp[0][0];
  for (genvar r = 1; r < N; r++) begin : g_plo
    assign p[r] = g_row[r].g_col[0].s;
  end
  for (genvar i = 1; i < N; i++) begin : g_phi
    assign p[N-1+i] = g_row[N-1].g_col[i].s;
  end
  assign p[2*N-1] = g_row[N-1].g_col[N-1].c;
endmodule
