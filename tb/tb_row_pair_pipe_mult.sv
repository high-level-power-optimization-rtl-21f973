// tb_row_pair_pipe_mult: the row-pair pipelined array multiplier at its
// default size (4x4, all 256 operand pairs back to back) and at 8x8 (random
// pairs with bubbles). The registered product seen before driving cycle n
// must be the product of the pair driven in cycle n-2: a latency of two
// cycles and one result per cycle.
module tb_row_pair_pipe_mult;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       v4, ov4, v8, ov8;
  logic [3:0] a4, b4;
  logic [7:0] y4, a8, b8;
  logic [15:0] y8;
  int checks = 0, failures = 0;

  logic        vh4 [2], vh8 [2];
  logic [7:0]  eh4 [2];
  logic [15:0] eh8 [2];

  row_pair_pipe_mult dut4 (.clk(clk), .rst_n(rst_n), .in_valid(v4), .a(a4), .b(b4),
                           .out_valid(ov4), .y(y4));
  row_pair_pipe_mult #(.N(8)) dut8 (.clk(clk), .rst_n(rst_n), .in_valid(v8), .a(a8), .b(b8),
                                    .out_valid(ov8), .y(y8));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic nv4, input int na4, input int nb4,
                      input logic nv8, input int na8, input int nb8);
    checks += 2;
    if (ov4 != vh4[0] || (vh4[0] && y4 != eh4[0])) begin
      failures++;
      if (failures < 20) $display("FAIL N=4 t=%0t valid=%0b y=%0d exp %0d", $time, ov4, y4, eh4[0]);
    end
    if (ov8 != vh8[0] || (vh8[0] && y8 != eh8[0])) begin
      failures++;
      if (failures < 20) $display("FAIL N=8 t=%0t valid=%0b y=%0d exp %0d", $time, ov8, y8, eh8[0]);
    end
    v4 = nv4; a4 = 4'(na4); b4 = 4'(nb4);
    v8 = nv8; a8 = 8'(na8); b8 = 8'(nb8);
    vh4[0] = vh4[1]; eh4[0] = eh4[1]; vh4[1] = nv4; eh4[1] = 8'(na4 * nb4);
    vh8[0] = vh8[1]; eh8[0] = eh8[1]; vh8[1] = nv8; eh8[1] = 16'(na8 * nb8);
    @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0;
    v4 = 1'b0; a4 = '0; b4 = '0;
    v8 = 1'b0; a8 = '0; b8 = '0;
    vh4 = '{1'b0, 1'b0}; eh4 = '{8'd0, 8'd0};
    vh8 = '{1'b0, 1'b0}; eh8 = '{16'd0, 16'd0};
    repeat (2) @(negedge clk);
    checks++;
    if (ov4 !== 1'b0 || y4 !== 8'd0 || ov8 !== 1'b0 || y8 !== 16'd0) begin
      failures++;
      $display("FAIL reset did not clear the outputs");
    end
    rst_n = 1'b1;
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        step(1'b1, a, b, 1'($urandom_range(0, 3) != 0),
             int'($urandom_range(0, 255)), int'($urandom_range(0, 255)));
    step(1'b1, 0, 0, 1'b1, 255, 255);
    step(1'b0, 0, 0, 1'b0, 0, 0);
    step(1'b0, 0, 0, 1'b0, 0, 0);
    step(1'b0, 0, 0, 1'b0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
