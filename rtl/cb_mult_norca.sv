// cb_mult_norca: N x N unsigned column-bypassing array multiplier without a
// final carry-propagate adder.
//
// Same array as csa_mult_norca: N-1 rows of N cells, diagonal carry-save
// wiring, and no final ripple-carry adder, the last-row carry of weight w
// entering the free input of the leftmost cell of weight w+1. In addition,
// every cell is a bypass_adder controlled by its array column's multiplicand
// bit: when x[i] = 0 all partial products of column i are 0 and, because row
// 1 starts with carry 0, so are all carries running down the column (each
// cell then has at most one input at 1). The column's adders are held still
// and each passes its sum input through. This saves switching power for
// multiplicands with zero bits and does not change the product. The argument
// holds for the leftmost column too, whose free inputs carry the forwarded
// last-row carries: those arrive on the sum input, which is passed through.
// The bypass cell and its control are this design's reading of applying the
// no-final-adder scheme to a column-bypassing multiplier.
//
// col_bypass[i] = ~x[i] reports which columns are skipped. Purely
// combinational. N defaults to 4; any N >= 2 works.
module cb_mult_norca #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   x,           // multiplicand (controls the bypass)
  input  logic [N-1:0]   y,           // multiplier
  output logic [2*N-1:0] p,           // product x*y
  output logic [N-1:0]   col_bypass   // column i is bypassed
);
  if (N < 2) begin : g_bad_n
    $error("cb_mult_norca needs N >= 2");
  end

  logic [N-1:0][N-1:0] pp;

  pp_gen #(.N(N)) u_pp (.x(x), .y(y), .pp(pp));

  assign col_bypass = ~x;

  for (genvar r = 1; r < N; r++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic s_in, c_in, s, c;

      if (i == N-1) begin : g_free
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

      bypass_adder u_ba (.a(pp[r][i]), .s_in(s_in), .c_in(c_in),
                         .bypass(col_bypass[i]), .sum(s), .cout(c));
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
