// csa: carry-save adder, a row of WIDTH independent full adders. It reduces
// three words to two without propagating any carry: x + y + z equals
// s + (c << 1). Delay is one full adder whatever the width. The multiplier
// has two of them, six full adders each, in its second pipeline stage.
// Combinational.
module csa #(
  parameter int unsigned WIDTH = 6
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] c   // bit i carries weight 2^(i+1)
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (x[i]),
      .b   (y[i]),
      .cin (z[i]),
      .sum (s[i]),
      .cout(c[i])
    );
  end
endmodule
