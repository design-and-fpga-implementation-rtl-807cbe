// tb_sha256_msg_schedule: message schedule window with the testbench acting
// as the shared compressor. Sixteen random words are loaded, then for each
// t = 0..63 the four operands are added here and shifted back in; their sum
// must equal the reference W(t) of the standard recurrence. Three blocks.
module tb_sha256_msg_schedule;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;
  logic clk = 0, load, shift;
  word_t load_word, w_new, op_s1, op_w7, op_s0, op_w16;
  logic [ITER_W-1:0] t;
  int checks = 0, failures = 0;

  sha256_msg_schedule dut (.clk, .load, .load_word, .shift, .w_new, .t,
                           .op_s1, .op_w7, .op_s0, .op_w16);

  always #5 clk = ~clk;
  assign w_new = op_s1 + op_w7 + op_s0 + op_w16;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; shift = 0; t = '0; load_word = '0;
    for (int blk = 0; blk < 3; blk++) begin
      blk_t m;
      sched_t w;
      for (int i = 0; i < 16; i++) m[i] = $urandom;
      w = expand(m);
      @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        load = 1; load_word = m[i];
        @(negedge clk);
      end
      load = 0;
      for (int i = 0; i < 64; i++) begin
        t = ITER_W'(i);
        #1;
        checks++;
        if (w_new !== w[i]) begin
          failures++;
          $display("FAIL block %0d W(%0d) = %h expected %h", blk, i, w_new, w[i]);
        end
        // an idle cycle between rounds, as in phase 1, must not shift
        @(negedge clk);
        shift = 1;
        @(negedge clk);
        shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
