// full_adder: one-bit full adder, the single cell the multiplier arrays are
// built from.
//
// sum  = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational, no
// clock. The multiplier is meant to be built from a low-transistor-count
// full-adder circuit (a 14- or 16-transistor cell); only its logic function
// is captured here, the transistor topology is left to the cell library.
// Where a position of the array has only two operands, the third input is
// tied to 0, as in the original carry-save array.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
