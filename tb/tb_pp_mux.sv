// tb_pp_mux: the partial-product multiplexer. First with random data words,
// every select value must route its own input; then, fed 0, a, 2a, 3a for
// every 2-bit a, the output must equal digit * a for every digit.
module tb_pp_mux;
  logic [1:0]       sel;
  logic [3:0][3:0]  d;
  logic [3:0]       y;
  int checks = 0, failures = 0;

  pp_mux dut (.sel(sel), .d(d), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      d   = 16'($urandom);
      sel = 2'($urandom);
      #1;
      checks++;
      if (y != d[sel]) begin
        failures++;
        $display("FAIL sel=%0d d=%h y=%h", sel, d, y);
      end
    end
    for (int a = 0; a < 4; a++) begin
      d = {4'(3 * a), 4'(2 * a), 4'(a), 4'd0};
      for (int k = 0; k < 4; k++) begin
        sel = 2'(k);
        #1;
        checks++;
        if (y != 4'(a * k)) begin
          failures++;
          $display("FAIL %0d x %0d gave %0d", a, k, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
