// tb_compressor42: exhaustive check of the one-bit 4-2 compressor.
// For all 32 combinations of a, b, c, d, cin it checks the counting identity
// a+b+c+d+cin = sum + 2*(carry+cout), and that cout does not depend on cin
// (it must be the majority of a, b, c).
module tb_compressor42;
  logic a, b, c, d, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor42 dut (.a, .b, .c, .d, .cin, .sum, .carry, .cout);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int total;
      {a, b, c, d, cin} = 5'(v);
      #1;
      total = int'(a) + int'(b) + int'(c) + int'(d) + int'(cin);
      checks++;
      if (total != int'(sum) + 2 * (int'(carry) + int'(cout))) begin
        failures++;
        $display("FAIL count v=%b sum=%b carry=%b cout=%b", 5'(v), sum, carry, cout);
      end
      checks++;
      if (cout != ((a & b) | (a & c) | (b & c))) begin
        failures++;
        $display("FAIL cout v=%b cout=%b", 5'(v), cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
