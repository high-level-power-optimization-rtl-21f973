// triple_gen: the partial-product CPA of the 4x4 multiplier. A 2x2 product
// a*d (a = multiplicand digit, d = multiplier digit) is one of 0, a, 2a, 3a;
// only 3a needs an adder. This block computes 3a = a + 2a for both 2-bit
// digits of the multiplicand, each with a 3-bit ripple adder, so the block
// is six full adders in two carry chains. The design gives the CPA's role and
// its six full adders; splitting it into two 3-bit chains is this design's
// reading of how one CPA serves all four multiplexers. Combinational.
module triple_gen
  import mult_pkg::*;
(
  input  operand_t p,      // multiplicand
  output pp_t      p3_lo,  // 3 * p[1:0]
  output pp_t      p3_hi   // 3 * p[3:2]
);
  logic [2:0] sum_lo, sum_hi;
  logic       cout_lo, cout_hi;

  cpa #(.WIDTH(3)) u_lo (
    .a   ({1'b0, p[1:0]}),
    .b   ({p[1:0], 1'b0}),
    .cin (1'b0),
    .sum (sum_lo),
    .cout(cout_lo)
  );

  cpa #(.WIDTH(3)) u_hi (
    .a   ({1'b0, p[3:2]}),
    .b   ({p[3:2], 1'b0}),
    .cin (1'b0),
    .sum (sum_hi),
    .cout(cout_hi)
  );

  assign p3_lo = {cout_lo, sum_lo};
  assign p3_hi = {cout_hi, sum_hi};
endmodule
