// tb_triple_gen: exhaustive check of the partial-product CPA. For all 16
// multiplicands the two outputs must be 3 x (low digit) and 3 x (high digit).
module tb_triple_gen;
  logic [3:0] p, p3_lo, p3_hi;
  int checks = 0, failures = 0;

  triple_gen dut (.p(p), .p3_lo(p3_lo), .p3_hi(p3_hi));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      p = 4'(v);
      #1;
      checks++;
      if (p3_lo != 4'(3 * (v % 4)) || p3_hi != 4'(3 * (v / 4))) begin
        failures++;
        $display("FAIL p=%0d lo=%0d hi=%0d", v, p3_lo, p3_hi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
