// tb_cpa: exhaustive check of the 6-bit ripple carry-propagate adder (all
// 64 x 64 operand pairs, both carry-in values), plus a random check of a
// 3-bit instance, the size used to form 3x a multiplicand digit.
module tb_cpa;
  logic [5:0] a, b, sum;
  logic       cin, cout;
  logic [2:0] a3, b3, sum3;
  logic       cin3, cout3;
  int checks = 0, failures = 0;

  cpa dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  cpa #(.WIDTH(3)) dut3 (.a(a3), .b(b3), .cin(cin3), .sum(sum3), .cout(cout3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 64; i++) begin
        for (int j = 0; j < 64; j++) begin
          a   = 6'(i);
          b   = 6'(j);
          cin = 1'(c);
          #1;
          checks++;
          if ({cout, sum} != 7'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d + %0d + %0d = %0d", i, j, c, {cout, sum});
          end
        end
      end
    end
    for (int v = 0; v < 128; v++) begin
      {cin3, a3, b3} = 7'(v);
      #1;
      checks++;
      if ({cout3, sum3} != 4'(int'(a3) + int'(b3) + int'(cin3))) begin
        failures++;
        $display("FAIL width 3: %0d + %0d + %0d = %0d", a3, b3, cin3, {cout3, sum3});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
