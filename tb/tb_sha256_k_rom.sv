// tb_sha256_k_rom: the 64 round constants against values recomputed from
// the cube roots of the first 64 primes.
module tb_sha256_k_rom;
  import sha256_ref_pkg::*;
  logic [5:0]  t;
  logic [31:0] k;
  int checks = 0, failures = 0;

  sha256_k_rom dut (.t, .k);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      t = 6'(i);
      #1;
      checks++;
      if (k !== kconst(i)) begin
        failures++;
        $display("FAIL K(%0d) = %h, expected %h", i, k, kconst(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
