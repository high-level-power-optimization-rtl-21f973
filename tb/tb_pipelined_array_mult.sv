// tb_pipelined_array_mult: the 4x4 two-stage pipelined multiplier.
// Operands are driven on the falling clock edge, one pair per cycle. The
// output seen before driving cycle n must be the product of the pair driven
// in cycle n-2, which checks the two-cycle latency and the one-result-per-
// cycle throughput at once. Phase 1 streams all 256 operand pairs back to
// back; phase 2 is random traffic with bubbles (in_valid low); phase 3
// asserts reset with data in flight and checks that valid is cleared.
// Phase 1 also counts clock edges explicitly: a 2-stage pipeline must finish
// n = 256 back-to-back tasks in k + (n - 1) = 257 cycles.
module tb_pipelined_array_mult;
  import mult_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n;
  logic     in_valid, out_valid;
  operand_t p, q;
  product_t product;
  int checks = 0, failures = 0;

  // what was driven two and one cycles ago
  logic     v_hist [2];
  product_t e_hist [2];

  pipelined_array_mult dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                            .p(p), .q(q), .out_valid(out_valid), .product(product));

  always #5 clk = ~clk;

  // clock edges and results, for the k + (n - 1) cycle count
  int cyc = 0, n_results = 0, cyc_start = 0, cyc_last = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      n_results++;
      if (n_results == 256) cyc_last = cyc;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check the output against the pair driven two cycles ago, then drive.
  task automatic step(input logic v, input int a, input int b);
    checks++;
    if (out_valid != v_hist[0] || (v_hist[0] && product != e_hist[0])) begin
      failures++;
      if (failures < 20)
        $display("FAIL t=%0t out_valid=%0b exp %0b product=%0d exp %0d",
                 $time, out_valid, v_hist[0], product, e_hist[0]);
    end
    in_valid  = v;
    p         = 4'(a);
    q         = 4'(b);
    v_hist[0] = v_hist[1];
    e_hist[0] = e_hist[1];
    v_hist[1] = v;
    e_hist[1] = 8'(a * b);
    @(negedge clk);
  endtask

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    p        = '0;
    q        = '0;
    v_hist   = '{1'b0, 1'b0};
    e_hist   = '{8'd0, 8'd0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // phase 1: every operand pair, back to back
    cyc_start = cyc;
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        step(1'b1, a, b);

    step(1'b0, 0, 0);
    step(1'b0, 0, 0);
    checks++;
    if (cyc_last - cyc_start != 257) begin
      failures++;
      $display("FAIL 256 tasks took %0d cycles, expected 257", cyc_last - cyc_start);
    end else $display("256 back-to-back products in %0d cycles", cyc_last - cyc_start);

    // phase 2: random traffic with bubbles
    for (int n = 0; n < 1000; n++)
      step(1'($urandom_range(0, 3) != 0), int'($urandom_range(0, 15)), int'($urandom_range(0, 15)));

    // drain
    step(1'b0, 0, 0);
    step(1'b0, 0, 0);
    step(1'b0, 0, 0);

    // phase 3: reset with two results in flight
    step(1'b1, 15, 15);
    in_valid = 1'b1;
    @(negedge clk);
    rst_n = 1'b0;
    #1;
    checks++;
    if (out_valid !== 1'b0 || product !== 8'd0) begin
      failures++;
      $display("FAIL reset did not clear the pipeline: out_valid=%0b product=%0d", out_valid, product);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
