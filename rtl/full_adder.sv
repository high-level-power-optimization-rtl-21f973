// full_adder: one-bit full adder, the cell every adder row of the multiplier
// is made of. It returns the two-bit sum {cout, sum} of three one-bit inputs.
// Purely combinational. The gate form (XOR sum, majority carry) is the
// textbook one; the design names the cell but does not draw its gates.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic half;

  always_comb begin
    half = a ^ b;
    sum  = half ^ cin;
    cout = (a & b) | (cin & half);
  end
endmodule
