// tb_pipelined_mult_top: end-to-end test of the top with every parameter at
// its default. Both multipliers get their own operand streams, one pair per
// cycle, with bubbles. Each output is compared, cycle by cycle, with the
// product of the pair driven two cycles earlier, computed here with the
// integer '*' operator.
//
// It also counts how often each mechanism of the design was exercised and
// counts a failure for any that never happened: pipeline fill after reset,
// back-to-back results (one per cycle), bubbles, each of the four choices
// of every partial-product multiplexer (0, a, 2a, 3a, the last from the
// partial-product CPA), carries out of the carry-save stage that the final
// CPA has to propagate, and a reset with data in flight.
module tb_pipelined_mult_top;
  import mult_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       mv, mov, rv, rov;
  operand_t   mp, mq;
  product_t   mprod;
  logic [3:0] ra, rb;
  logic [7:0] ry;
  int checks = 0, failures = 0;

  logic     mvh [2], rvh [2];
  product_t meh [2];
  logic [7:0] reh [2];

  // mechanism counters
  int n_fill = 0, n_back_to_back = 0, n_bubble = 0, n_cpa_carry = 0, n_reset_flush = 0;
  int n_digit [2][4];   // [digit position][value]
  logic prev_mov;

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

  task automatic step(input logic nmv, input int a, input int b,
                      input logic nrv, input int c, input int d);
    checks += 2;
    if (mov != mvh[0] || (mvh[0] && mprod != meh[0])) begin
      failures++;
      if (failures < 20) $display("FAIL mul t=%0t valid=%0b product=%0d exp %0d", $time, mov, mprod, meh[0]);
    end
    if (rov != rvh[0] || (rvh[0] && ry != reh[0])) begin
      failures++;
      if (failures < 20) $display("FAIL rp t=%0t valid=%0b y=%0d exp %0d", $time, rov, ry, reh[0]);
    end
    // mechanisms, observed on the multiplier built from 2x2 products
    if (mov && prev_mov) n_back_to_back++;
    if (!mov && prev_mov) n_bubble++;
    if (mov && (dut.u_mul.cs_q.carry != '0)) n_cpa_carry++;
    prev_mov = mov;
    if (nmv) begin
      n_digit[0][b % 4]++;
      n_digit[1][b / 4]++;
    end
    mv = nmv; mp = 4'(a); mq = 4'(b);
    rv = nrv; ra = 4'(c); rb = 4'(d);
    mvh[0] = mvh[1]; meh[0] = meh[1]; mvh[1] = nmv; meh[1] = 8'(a * b);
    rvh[0] = rvh[1]; reh[0] = reh[1]; rvh[1] = nrv; reh[1] = 8'(c * d);
    @(negedge clk);
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    mv = 1'b0; rv = 1'b0;
    mvh = '{1'b0, 1'b0}; rvh = '{1'b0, 1'b0};
    prev_mov = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  task automatic check_fill(input int a, input int b);
    // first pair after reset: nothing for two cycles, then the result
    step(1'b1, a, b, 1'b1, b, a);
    checks++;
    if (mov !== 1'b0 || rov !== 1'b0) begin failures++; $display("FAIL output valid one cycle early"); end
    step(1'b0, 0, 0, 1'b0, 0, 0);
    checks++;
    if (mov === 1'b1 && mprod == 8'(a * b) && rov === 1'b1 && ry == 8'(b * a)) n_fill++;
    else begin failures++; $display("FAIL fill: result not there after two cycles"); end
    step(1'b0, 0, 0, 1'b0, 0, 0);
  endtask

  initial begin
    mp = '0; mq = '0; ra = '0; rb = '0;
    meh = '{8'd0, 8'd0}; reh = '{8'd0, 8'd0};
    foreach (n_digit[i, j]) n_digit[i][j] = 0;
    do_reset();
    check_fill(13, 11);

    // all pairs back to back on the 2x2-product multiplier, random on the other
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        step(1'b1, a, b, 1'($urandom_range(0, 1)), int'($urandom_range(0, 15)), int'($urandom_range(0, 15)));
    // random traffic with bubbles on both
    for (int n = 0; n < 2000; n++)
      step(1'($urandom_range(0, 2) != 0), int'($urandom_range(0, 15)), int'($urandom_range(0, 15)),
           1'($urandom_range(0, 2) != 0), int'($urandom_range(0, 15)), int'($urandom_range(0, 15)));

    // reset with results in flight, then refill
    step(1'b1, 15, 15, 1'b1, 15, 15);
    step(1'b1, 7, 9, 1'b1, 9, 7);
    rst_n = 1'b0;
    #1;
    checks++;
    if (mov === 1'b0 && rov === 1'b0) n_reset_flush++;
    else begin failures++; $display("FAIL reset did not clear the pipelines"); end
    @(negedge clk);
    do_reset();
    check_fill(15, 15);

    $display("mechanisms: fill=%0d back_to_back=%0d bubble=%0d cpa_carry=%0d reset_flush=%0d",
             n_fill, n_back_to_back, n_bubble, n_cpa_carry, n_reset_flush);
    $display("digit values (low q digit 0..3): %0d %0d %0d %0d  (high q digit): %0d %0d %0d %0d",
             n_digit[0][0], n_digit[0][1], n_digit[0][2], n_digit[0][3],
             n_digit[1][0], n_digit[1][1], n_digit[1][2], n_digit[1][3]);
    checks += 5;
    if (n_fill == 0)         begin failures++; $display("FAIL pipeline fill never seen"); end
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back results"); end
    if (n_bubble == 0)       begin failures++; $display("FAIL no bubble"); end
    if (n_cpa_carry == 0)    begin failures++; $display("FAIL final CPA never propagated a carry"); end
    if (n_reset_flush == 0)  begin failures++; $display("FAIL no reset with data in flight"); end
    foreach (n_digit[i, j]) begin
      checks++;
      if (n_digit[i][j] == 0) begin failures++; $display("FAIL mux choice %0d never used at digit %0d", j, i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
