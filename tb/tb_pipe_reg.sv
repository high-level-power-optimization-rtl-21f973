// tb_pipe_reg: the pipeline register rank. Checks that reset clears data
// and valid, and that over random traffic q and valid_q equal the d and
// valid_d of the previous clock edge (a latency of exactly one cycle).
module tb_pipe_reg;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       valid_d, valid_q;
  logic [7:0] d, q;
  logic [7:0] prev_d;
  logic       prev_v;
  int checks = 0, failures = 0;

  pipe_reg dut (.clk(clk), .rst_n(rst_n), .valid_d(valid_d), .d(d),
                .valid_q(valid_q), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n   = 1'b0;
    valid_d = 1'b1;
    d       = 8'hff;
    #12;
    checks++;
    if (valid_q !== 1'b0 || q !== 8'h00) begin
      failures++;
      $display("FAIL reset: valid_q=%0b q=%h", valid_q, q);
    end
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      d       = 8'($urandom);
      valid_d = 1'($urandom);
      prev_d  = d;
      prev_v  = valid_d;
      @(negedge clk);
      checks++;
      if (q != prev_d || valid_q != prev_v) begin
        failures++;
        $display("FAIL cycle %0d: q=%h exp %h valid=%0b exp %0b", n, q, prev_d, valid_q, prev_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
