// tb_sha256_fold_ctrl: round/phase sequencing for folding factor 2.
// After start it checks that there are exactly 128 round cycles, that the
// phase alternates 0,1 from the first one, that t counts 0..63 and changes
// only after phase 1, that one update cycle follows, and that done pulses
// 130 clocks after the start cycle. A start while busy must be ignored.
module tb_sha256_fold_ctrl;
  import sha256_pkg::*;
  logic clk = 0, rst, start;
  logic init, round_en, phase, update, busy, done;
  logic [ITER_W-1:0] t;
  int checks = 0, failures = 0;

  sha256_fold_ctrl dut (.clk, .rst, .start, .init, .round_en, .phase, .t,
                        .update, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_that(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    rst = 1; start = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    expect_that(!busy && !init, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      int rounds, updates, cyc;
      rounds = 0; updates = 0; cyc = 0;
      start = 1; #1;
      expect_that(init, "init on start");
      @(posedge clk); #1 start = 0;
      cyc = 1;
      while (!done && cyc < 400) begin
        if (round_en) begin
          expect_that(phase == rounds[0], "phase alternates");
          expect_that(int'(t) == rounds / 2, "round index");
          rounds++;
          // a start while busy is ignored
          if (rounds == 40) start = 1;
        end
        expect_that(!(init && busy), "no init while busy");
        if (update) updates++;
        @(posedge clk); #1 start = 0;
        cyc++;
      end
      expect_that(rounds == 2 * ROUNDS, "128 round cycles");
      expect_that(updates == 1, "one update cycle");
      expect_that(cyc == 130, $sformatf("done after 130 clocks (got %0d)", cyc));
      @(posedge clk); #1;
      expect_that(!done && !busy, "done is a pulse, back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
