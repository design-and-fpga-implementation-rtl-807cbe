// tb_csa42_adder: four-operand modulo-2^32 adder built from 4-2 compressors.
// Corner operands (all zeros, all ones, single top bits) and 2000 random
// operand sets; sum must equal (a+b+c+d) mod 2^32 and the redundant pair
// must add to the same value.
module tb_csa42_adder;
  logic [31:0] a, b, c, d, sum, sv, cv;
  int checks = 0, failures = 0;

  csa42_adder dut (.a, .b, .c, .d, .sum, .sum_vec(sv), .carry_vec(cv));

  task automatic check();
    logic [31:0] exp;
    #1;
    exp = a + b + c + d;
    checks++;
    if (sum !== exp) begin
      failures++;
      $display("FAIL %h+%h+%h+%h = %h, got %h", a, b, c, d, exp, sum);
    end
    checks++;
    if (sv + cv !== exp) begin
      failures++;
      $display("FAIL redundant pair %h %h", sv, cv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; c = '0; d = '0; check();
    a = '1; b = '1; c = '1; d = '1; check();
    a = 32'h8000_0000; b = 32'h8000_0000; c = 32'h8000_0000; d = 32'h8000_0000; check();
    a = '1; b = 32'd1; c = '0; d = '0; check();
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = $urandom; c = $urandom; d = $urandom;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
