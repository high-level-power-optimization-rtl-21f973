// tb_bit_product: checks the bit-level multiplier against the binary
// multiplication table 0x0 = 0x1 = 1x0 = 0, 1x1 = 1.
module tb_bit_product;
  logic p, q, s;
  int checks = 0, failures = 0;

  bit_product dut (.p(p), .q(q), .s(s));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      for (int j = 0; j < 2; j++) begin
        p = 1'(i);
        q = 1'(j);
        #1;
        checks++;
        if (s != 1'(i * j)) begin
          failures++;
          $display("FAIL %0d x %0d gave %0b", i, j, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
