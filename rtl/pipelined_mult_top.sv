// pipelined_mult_top: the two pipelined multipliers side by side.
//  - mul_*: the 4x4 multiplier built from four 2x2 products (one CPA and
//    four MUXes, two CSAs, a final CPA) with two register ranks. Product
//    appears two clocks after the operands; the last CPA is after the second
//    rank, so mul_product is combinational from it.
//  - rp_*: the N x N array multiplier pipelined by pairs of array rows
//    (N = RP_N, default 4), with a registered product two clocks later.
// Both accept one operand pair per clock and share clock and reset
// (asynchronous, active low). They are independent; nothing connects them.
module pipelined_mult_top
  import mult_pkg::*;
#(
  parameter int unsigned RP_N = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // 4x4 multiplier from 2x2 products
  input  logic              mul_in_valid,
  input  operand_t          mul_p,
  input  operand_t          mul_q,
  output logic              mul_out_valid,
  output product_t          mul_product,
  // row-pair pipelined array multiplier
  input  logic              rp_in_valid,
  input  logic [RP_N-1:0]   rp_a,
  input  logic [RP_N-1:0]   rp_b,
  output logic              rp_out_valid,
  output logic [2*RP_N-1:0] rp_y
);
  pipelined_array_mult u_mul (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (mul_in_valid),
    .p        (mul_p),
    .q        (mul_q),
    .out_valid(mul_out_valid),
    .product  (mul_product)
  );

  row_pair_pipe_mult #(.N(RP_N)) u_rp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (rp_in_valid),
    .a        (rp_a),
    .b        (rp_b),
    .out_valid(rp_out_valid),
    .y        (rp_y)
  );
endmodule
