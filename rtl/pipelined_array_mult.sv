// pipelined_array_mult: unsigned 4x4 multiplier in two pipeline stages.
//
// Instead of one 4x4 array, the product is built from four 2x2 products.
// With p = {p_hi, p_lo} and q = {q_hi, q_lo} split into 2-bit digits,
//   p*q = pp00 + (pp01 + pp10) * 4 + pp11 * 16,   ppXY = pX * qY.
// Stage 1: a CPA (triple_gen) forms 3*p_lo and 3*p_hi, and four multiplexers
//   pick 0, a, 2a or 3a by a multiplier digit: the four 4-bit products.
//   They are registered (first register rank).
// Stage 2: two 6-bit carry-save adders work on product columns 2..7. The
//   first adds pp00[3:2], pp01 and pp10; the second adds its sum and carry
//   to pp11. Product bits 1..0 are pp00[1:0] and need no addition. The
//   carry-save pair and those two bits are registered (second rank).
// Output: a 6-bit CPA resolves the carry-save pair into product bits 7..2.
//
// The block list (one CPA and four MUXes, two CSAs, a final CPA, six full
// adders per adder row) and the placement of both register ranks follow the
// design. The bit alignment of the adder rows, the valid bit and the reset
// are this design's own. Like the design's drawing, the final CPA sits after
// the last register, so the product is combinational from it.
//
// Timing: p and q sampled with in_valid at clock edge k give product and
// out_valid right after edge k+2. A new operand pair can be accepted at every
// clock: one result per cycle once the pipeline is full.
module pipelined_array_mult
  import mult_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  operand_t p,          // multiplicand
  input  operand_t q,          // multiplier
  output logic     out_valid,
  output product_t product
);

  // ---------------- stage 1: partial products ----------------
  pp_t     p3_lo, p3_hi;
  pp_set_t pp_d, pp_q;
  logic    v1;

  triple_gen u_triple (
    .p    (p),
    .p3_lo(p3_lo),
    .p3_hi(p3_hi)
  );

  // d[k] = k * digit, k = 0..3
  pp_t [3:0] mult_lo, mult_hi;
  assign mult_lo = {p3_lo, {1'b0, p[1:0], 1'b0}, {2'b00, p[1:0]}, 4'b0000};
  assign mult_hi = {p3_hi, {1'b0, p[3:2], 1'b0}, {2'b00, p[3:2]}, 4'b0000};

  pp_mux u_mux00 (.sel(q[1:0]), .d(mult_lo), .y(pp_d.pp00));
  pp_mux u_mux01 (.sel(q[3:2]), .d(mult_lo), .y(pp_d.pp01));
  pp_mux u_mux10 (.sel(q[1:0]), .d(mult_hi), .y(pp_d.pp10));
  pp_mux u_mux11 (.sel(q[3:2]), .d(mult_hi), .y(pp_d.pp11));

  pipe_reg #(.WIDTH($bits(pp_set_t))) u_rank1 (
    .clk    (clk),
    .rst_n  (rst_n),
    .valid_d(in_valid),
    .d      (pp_d),
    .valid_q(v1),
    .q      (pp_q)
  );

  // ---------------- stage 2: carry-save reduction ----------------
  // Slices hold product columns 2..7 (slice bit i = column i+2).
  slice_t   s1, c1, s2, c2;
  cs_pair_t cs_d, cs_q;

  csa #(.WIDTH(ADD_W)) u_csa1 (
    .x({4'b0000, pp_q.pp00[3:2]}),
    .y({2'b00, pp_q.pp01}),
    .z({2'b00, pp_q.pp10}),
    .s(s1),
    .c(c1)
  );

  // c1 bit i has the weight of column i+3: shift it up one slice position.
  // c1[5] is column 8 and always 0, since the slice total stays below 64.
  csa #(.WIDTH(ADD_W)) u_csa2 (
    .x(s1),
    .y({c1[ADD_W-2:0], 1'b0}),
    .z({pp_q.pp11, 2'b00}),
    .s(s2),
    .c(c2)
  );

  assign cs_d.sum   = s2;
  assign cs_d.carry = c2;
  assign cs_d.low   = pp_q.pp00[1:0];

  pipe_reg #(.WIDTH($bits(cs_pair_t))) u_rank2 (
    .clk    (clk),
    .rst_n  (rst_n),
    .valid_d(v1),
    .d      (cs_d),
    .valid_q(out_valid),
    .q      (cs_q)
  );

  // ---------------- output: final carry-propagate adder ----------------
  slice_t high;
  logic   high_cout;

  cpa #(.WIDTH(ADD_W)) u_cpa (
    .a   (cs_q.sum),
    .b   ({cs_q.carry[ADD_W-2:0], 1'b0}),
    .cin (1'b0),
    .sum (high),
    .cout(high_cout)
  );

  assign product = {high, cs_q.low};

  // A 4x4 product fits in 8 bits: nothing may carry out of column 7. The
  // valid bits are low during reset, so they also gate these checks.
  a_no_col8_stage2 : assert property (@(posedge clk)
    v1 |-> (c1[ADD_W-1] == 1'b0 && c2[ADD_W-1] == 1'b0));
  a_no_cpa_carry : assert property (@(posedge clk)
    out_valid |-> (high_cout == 1'b0));

endmodule
