// pp_mux: partial-product multiplexer, one 2x2 multiplier of the 4x4 design.
// A 2-bit multiplier digit selects among four 4-bit inputs that hold 0, a,
// 2a and 3a for a 2-bit multiplicand digit a, so the output is the 4-bit
// product digit*a. Two select bits and four 4-bit data inputs are as the
// design gives them; the order of the data inputs (index = digit value) is
// this design's choice. Combinational.
module pp_mux
  import mult_pkg::*;
(
  input  digit_t         sel,  // multiplier digit
  input  pp_t    [3:0]   d,    // d[k] = k * multiplicand digit
  output pp_t            y
);
  always_comb begin
    unique case (sel)
      2'd0:    y = d[0];
      2'd1:    y = d[1];
      2'd2:    y = d[2];
      default: y = d[3];
    endcase
  end
endmodule
