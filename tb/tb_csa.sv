// tb_csa: exhaustive-by-bit and random check of the 6-bit carry-save adder.
// For every input triple, s must be the bitwise XOR, c the bitwise majority,
// and s + 2c must equal x + y + z.
module tb_csa;
  logic [5:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  task automatic check();
    logic [5:0] exp_s, exp_c;
    #1;
    exp_s = x ^ y ^ z;
    exp_c = (x & y) | (x & z) | (y & z);
    checks++;
    if (s != exp_s || c != exp_c || (int'(s) + 2 * int'(c)) != (int'(x) + int'(y) + int'(z))) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // every column sees all eight bit combinations
    for (int v = 0; v < 8; v++) begin
      x = {6{v[2]}};
      y = {6{v[1]}};
      z = {6{v[0]}};
      check();
    end
    for (int n = 0; n < 4000; n++) begin
      x = 6'($urandom);
      y = 6'($urandom);
      z = 6'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
