// bypass_adder: full-adder cell of a column-bypassing array multiplier.
//
// When bypass is 0 it is an ordinary full adder of a (partial product), s_in
// (sum from the row above) and c_in (carry from the row above). When bypass
// is 1 (the column's multiplicand bit is 0, so a = 0 and c_in = 0 in every
// cell of that column) the adder's inputs are forced to 0 so that it does not
// switch, s_in is passed straight to sum and cout is 0. The result is the
// same as the plain full adder's whenever a = c_in = 0; only the switching
// activity differs. Forcing the inputs with AND gates (operand isolation) is
// this design's choice of how to hold the adder still; the bypass idea
// itself, a multiplexer on the sum and a gated carry, follows the column-
// bypassing multiplier. Purely combinational.
module bypass_adder (
  input  logic a,       // partial product of this cell
  input  logic s_in,    // sum from the row above
  input  logic c_in,    // carry from the row above
  input  logic bypass,  // 1: column is skipped
  output logic sum,
  output logic cout
);
  logic a_g, s_g, c_g, fa_sum, fa_cout;

  always_comb begin
    a_g = a    & ~bypass;
    s_g = s_in & ~bypass;
    c_g = c_in & ~bypass;
  end

  full_adder u_fa (.a(a_g), .b(s_g), .cin(c_g), .sum(fa_sum), .cout(fa_cout));

  always_comb begin
    sum  = bypass ? s_in : fa_sum;
    cout = fa_cout & ~bypass;
  end
endmodule
