// tb_sha256_folded_datapath: the two-compressor round datapath on its own.
// The testbench plays controller and message schedule: it loads random
// A..H, then runs 64 rounds of two cycles with K(t) and the schedule
// operands (W(t) split into four random parts). After phase 0 of each round
// the right compressor must return W(t); after phase 1 the state must equal
// the reference round. Three blocks, each from a random start state.
module tb_sha256_folded_datapath;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;
  logic clk = 0, rst, init, round_en, phase;
  state_t h_init, state;
  word_t k, op_s1, op_w7, op_s0, op_w16, w_new;
  int checks = 0, failures = 0;

  sha256_folded_datapath dut (.clk, .rst, .init, .h_init, .round_en, .phase, .k,
                              .op_s1, .op_w7, .op_s0, .op_w16, .w_new, .state);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic st_t to_st(state_t s);
    return '{s.a, s.b, s.c, s.d, s.e, s.f, s.g, s.h};
  endfunction

  initial begin
    rst = 1; init = 0; round_en = 0; phase = 0; k = '0;
    op_s1 = '0; op_w7 = '0; op_s0 = '0; op_w16 = '0; h_init = '0;
    @(negedge clk); rst = 0;
    for (int blk = 0; blk < 3; blk++) begin
      st_t s;
      for (int i = 0; i < 8; i++) s[i] = $urandom;
      h_init = {s[0], s[1], s[2], s[3], s[4], s[5], s[6], s[7]};
      init = 1; @(negedge clk); init = 0;
      checks++;
      if (to_st(state) != s) begin
        failures++;
        $display("FAIL init");
      end
      for (int t = 0; t < 64; t++) begin
        word_t wt;
        wt = $urandom;
        round_en = 1; phase = 0; k = kconst(t);
        op_s1 = $urandom; op_w7 = $urandom; op_s0 = $urandom;
        op_w16 = wt - op_s1 - op_w7 - op_s0;
        #1;
        checks++;
        if (w_new !== wt) begin
          failures++;
          $display("FAIL W(%0d) %h expected %h", t, w_new, wt);
        end
        @(negedge clk);
        phase = 1;
        op_s1 = $urandom; op_w7 = $urandom; op_s0 = $urandom; op_w16 = $urandom;
        @(negedge clk);
        s = round(s, kconst(t), wt);
        checks++;
        if (to_st(state) != s) begin
          failures++;
          $display("FAIL block %0d round %0d: a=%h e=%h expected a=%h e=%h",
                   blk, t, state.a, state.e, s[0], s[4]);
        end
      end
      round_en = 0; phase = 0;
      // state holds when idle
      repeat (3) @(negedge clk);
      checks++;
      if (to_st(state) != s) begin
        failures++;
        $display("FAIL state not held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
