// lpla_mult_top: the two multipliers of this design side by side.
//
//   a_*  the proposed carry-save array multiplier without a final adder
//        (csa_mult_norca), N x N unsigned, product a_p = a_x * a_y;
//   b_*  the same scheme applied to a column-bypassing multiplier
//        (cb_mult_norca), product b_p = b_x * b_y, with b_bypass showing
//        which multiplicand columns are currently skipped.
// The two have independent operands so either can be used or measured on its
// own. Both are purely combinational, no clock or reset; a result settles one
// array delay after its operands change. N defaults to 4, the 4x4 multiplier.
module lpla_mult_top #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a_x,
  input  logic [N-1:0]   a_y,
  output logic [2*N-1:0] a_p,
  input  logic [N-1:0]   b_x,
  input  logic [N-1:0]   b_y,
  output logic [2*N-1:0] b_p,
  output logic [N-1:0]   b_bypass
);
  csa_mult_norca #(.N(N)) u_array (.x(a_x), .y(a_y), .p(a_p));

  cb_mult_norca #(.N(N)) u_bypass (.x(b_x), .y(b_y), .p(b_p), .col_bypass(b_bypass));
endmodule
