// tb_signal_prob_workload: the characterisation workload of the 4x4
// pipelined multiplier. For each input signal probability P = 1/8 .. 7/8,
// a stream of 1000 random operand pairs is applied back to back in which
// every one of the 8 operand bits is 1 with probability P, independently.
//
// For each stream the testbench
//  - checks every product against the integer '*' operator,
//  - measures the signal probability of the stream: the fraction of
//    (vector, input bit) slots holding 1, which must be within 0.03 of P,
//  - counts 1->0 transitions per vector on the register ranks and the
//    product, the activity measure that the dynamic power estimate
//    sum(C * Vdd^2 * transitions) / vectors is built on. These counts are
//    printed, not checked: capacitances and power are not modelled.
module tb_signal_prob_workload;
  import mult_pkg::*;

  localparam int VECTORS = 1000;

  logic     clk = 1'b0;
  logic     rst_n;
  logic     mv, mov, rv, rov;
  operand_t mp, mq;
  product_t mprod;
  logic [3:0] ra, rb;
  logic [7:0] ry;
  int checks = 0, failures = 0;

  logic     vh [2];
  product_t eh [2];

  pipelined_mult_top dut (
    .clk(clk), .rst_n(rst_n),
    .mul_in_valid(mv), .mul_p(mp), .mul_q(mq), .mul_out_valid(mov), .mul_product(mprod),
    .rp_in_valid(rv), .rp_a(ra), .rp_b(rb), .rp_out_valid(rov), .rp_y(ry)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 1->0 transition counters, sampled once per cycle
  int fall_rank1, fall_rank2, fall_prod;
  logic [$bits(pp_set_t)-1:0]  last_r1;
  logic [$bits(cs_pair_t)-1:0] last_r2;
  product_t                    last_prod;

  function automatic int falls(input logic [31:0] prev, input logic [31:0] now);
    return $countones(prev & ~now);
  endfunction

  always @(negedge clk) begin
    fall_rank1 += falls(32'(last_r1), 32'(dut.u_mul.pp_q));
    fall_rank2 += falls(32'(last_r2), 32'(dut.u_mul.cs_q));
    fall_prod  += falls(32'(last_prod), 32'(mprod));
    last_r1   = dut.u_mul.pp_q;
    last_r2   = dut.u_mul.cs_q;
    last_prod = mprod;
  end

  function automatic logic [3:0] biased_nibble(input int k8);
    logic [3:0] r;
    for (int i = 0; i < 4; i++) r[i] = ($urandom_range(0, 7) < k8);
    return r;
  endfunction

  task automatic step(input logic v, input logic [3:0] a, input logic [3:0] b);
    if (vh[0]) begin
      checks++;
      if (!mov || mprod != eh[0]) begin
        failures++;
        if (failures < 20) $display("FAIL t=%0t product=%0d exp %0d", $time, mprod, eh[0]);
      end
    end
    mv = v; mp = a; mq = b;
    vh[0] = vh[1]; eh[0] = eh[1];
    vh[1] = v;     eh[1] = 8'(int'(a) * int'(b));
    @(negedge clk);
  endtask

  initial begin
    int ones;
    real p_meas;
    logic [3:0] a, b;
    rst_n = 1'b0;
    mv = 1'b0; rv = 1'b0; mp = '0; mq = '0; ra = '0; rb = '0;
    vh = '{1'b0, 1'b0}; eh = '{8'd0, 8'd0};
    @(negedge clk);
    rst_n = 1'b1;
    $display("   P    P(meas)  rank1 1->0/vec  rank2 1->0/vec  product 1->0/vec");
    for (int k8 = 1; k8 <= 7; k8++) begin
      ones = 0;
      fall_rank1 = 0; fall_rank2 = 0; fall_prod = 0;
      for (int n = 0; n < VECTORS; n++) begin
        a = biased_nibble(k8);
        b = biased_nibble(k8);
        ones += $countones({a, b});
        step(1'b1, a, b);
      end
      p_meas = real'(ones) / real'(8 * VECTORS);
      $display("%6.3f  %6.3f   %8.3f        %8.3f        %8.3f", real'(k8) / 8.0, p_meas,
               real'(fall_rank1) / VECTORS, real'(fall_rank2) / VECTORS, real'(fall_prod) / VECTORS);
      checks++;
      if (p_meas < real'(k8) / 8.0 - 0.03 || p_meas > real'(k8) / 8.0 + 0.03) begin
        failures++;
        $display("FAIL measured signal probability %f for target %f", p_meas, real'(k8) / 8.0);
      end
    end
    step(1'b0, '0, '0);
    step(1'b0, '0, '0);
    step(1'b0, '0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
