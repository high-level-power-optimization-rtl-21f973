// cpa: carry-propagate adder, a ripple chain of WIDTH full adders. The carry
// of bit i feeds the carry input of bit i+1, so the delay grows with WIDTH.
// The multiplier uses it twice: split into two 3-bit chains to form 3x the
// multiplicand digits, and as the final 6-bit adder that turns the
// carry-save pair into product bits 7..2. The default of six full adders per
// row is the design's; the ripple organisation is the simplest CPA and is
// this design's choice. Combinational; sum = a + b + cin, cout is bit WIDTH.
module cpa #(
  parameter int unsigned WIDTH = 6
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
