// tb_sha256_padder: pre-processing. Messages of random length 0..200
// characters, plus the one-character example 8'hF0 and the block-boundary
// lengths 55, 56, 63, 64, 119 and 120, are sent character by character
// (waiting for ready, with random gaps). Every streamed block must equal the
// reference padded block, with the right first/last flags, come on sixteen
// consecutive clocks once core_ready is high, and be followed by one clock of
// padding_done. A second instance with a 7-bit byte counter (LEN_W = 10,
// at most 127 characters) must raise overflow_err on a 128-character message,
// send no last block, and clear the flag with the next message.
module tb_sha256_padder;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;
  logic clk = 0, rst, byte_rdy, byte_stop, core_ready;
  logic [7:0] data_in;
  logic ready, overflow_err, flag_0_15, padding_done, first_blk, last_blk;
  word_t padd_out;
  // small instance for the overflow test
  logic s_rdy, s_stop;
  logic s_ready, s_ovf, s_flag, s_done, s_first, s_last;
  word_t s_out;
  int checks = 0, failures = 0;
  int n_overflow = 0, n_lenblk = 0, n_datablk = 0;
  // message lengths around the block boundaries
  int lens[8] = '{1, 0, 55, 56, 63, 64, 119, 120};

  sha256_padder dut (.clk, .rst, .byte_rdy, .byte_stop, .data_in, .core_ready,
                     .ready, .overflow_err, .flag_0_15, .padd_out, .padding_done,
                     .first_blk, .last_blk);

  sha256_padder #(.LEN_W(10)) dut_small (
    .clk, .rst, .byte_rdy(s_rdy), .byte_stop(s_stop), .data_in, .core_ready(1'b1),
    .ready(s_ready), .overflow_err(s_ovf), .flag_0_15(s_flag), .padd_out(s_out),
    .padding_done(s_done), .first_blk(s_first), .last_blk(s_last));

  always #5 clk = ~clk;

  initial begin
    #20000000;
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

  // Block checker: collects every streamed block and compares it with the
  // expected block queue.
  logic [511:0] exp_blk[$];

  function automatic logic [511:0] b2v(blk_t b);
    logic [511:0] v;
    for (int i = 0; i < 16; i++) v[511 - 32*i -: 32] = b[i];
    return v;
  endfunction

  bit   exp_first[$], exp_last[$];
  int   widx = 0;
  blk_t got;

  always @(negedge clk) begin
    if (!rst && flag_0_15) begin
      got[widx] = padd_out;
      widx++;
    end
    if (!rst && padding_done) begin
      checks++;
      if (widx != 16 || exp_blk.size() == 0) begin
        failures++;
        $display("FAIL block with %0d words (expected blocks left %0d)", widx, exp_blk.size());
      end else begin
        logic [511:0] e;
        bit ef, el;
        e = exp_blk.pop_front();
        ef = exp_first.pop_front();
        el = exp_last.pop_front();
        if (b2v(got) != e || first_blk != ef || last_blk != el) begin
          failures++;
          $display("FAIL block mismatch first=%b/%b last=%b/%b w0=%h/%h w15=%h/%h",
                   first_blk, ef, last_blk, el, got[0], e[511:480], got[15], e[31:0]);
        end
      end
      widx = 0;
    end
  end

  // Words appear only on consecutive clocks and only after core_ready.
  logic prev_flag = 0;
  always @(negedge clk) begin
    if (!rst && flag_0_15 && !prev_flag && widx != 0) begin
      failures++;
      $display("FAIL words not consecutive");
    end
    prev_flag <= flag_0_15;
  end

  // core_ready is withdrawn now and then to make blocks wait
  always @(negedge clk) core_ready <= ($urandom_range(7) != 0);

  task automatic send(byte unsigned m[$]);
    foreach (m[i]) begin
      while (!ready) @(negedge clk);
      byte_rdy = 1; data_in = m[i];
      @(negedge clk);
      byte_rdy = 0;
      if ($urandom_range(3) == 0) @(negedge clk);
    end
    while (!ready) @(negedge clk);
    byte_stop = 1;
    @(negedge clk);
    byte_stop = 0;
  endtask

  task automatic run_msg(byte unsigned m[$]);
    int nb = num_blocks(m.size());
    for (int b = 0; b < nb; b++) begin
      exp_blk.push_back(b2v(pad_block(m, b)));
      exp_first.push_back(b == 0);
      exp_last.push_back(b == nb - 1);
    end
    if (nb == (m.size() + 63) / 64 + 1 && m.size() % 64 != 0) n_lenblk++;
    if (m.size() >= 64) n_datablk++;
    send(m);
    while (exp_blk.size() != 0) @(negedge clk);
    @(negedge clk);
    expect_that(ready && !flag_0_15, "idle after the message");
  endtask

  function automatic void rnd_msg(ref byte unsigned m[$], input int n);
    m = {};
    for (int i = 0; i < n; i++) m.push_back(8'($urandom));
  endfunction

  initial begin
    byte unsigned m[$];
    rst = 1; byte_rdy = 0; byte_stop = 0; data_in = '0; s_rdy = 0; s_stop = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // the one-character example: 11110000 -> 11110000 1000...
    m = '{8'hF0};
    expect_that(b2v(pad_block(m, 0))[511:480] == 32'b11110000100000000000000000000000,
                "example padded word");
    run_msg(m);
    foreach (lens[i]) begin
      rnd_msg(m, lens[i]);
      run_msg(m);
    end
    for (int r = 0; r < 25; r++) begin
      int n;
      n = $urandom_range(200);
      rnd_msg(m, n);
      run_msg(m);
    end
    expect_that(exp_blk.size() == 0, "all blocks seen");
    expect_that(n_lenblk > 0 && n_datablk > 0, "length-only and full data blocks occurred");

    // overflow on the small instance: 128 characters exceed a 7-bit count
    begin
      int nlast;
      nlast = 0;
      for (int i = 0; i < 128; i++) begin
        while (!s_ready) begin
          if (s_done && s_last) nlast++;
          @(negedge clk);
        end
        s_rdy = 1; data_in = 8'($urandom);
        @(negedge clk);
        s_rdy = 0;
      end
      expect_that(s_ovf, "overflow_err raised");
      if (s_ovf) n_overflow++;
      s_stop = 1; @(negedge clk); s_stop = 0;
      repeat (40) begin
        if (s_done && s_last) nlast++;
        @(negedge clk);
      end
      expect_that(nlast == 0, "over-long message has no last block");
      expect_that(s_ovf, "overflow_err held until the next message");
      s_rdy = 1; data_in = 8'h61; @(negedge clk); s_rdy = 0;
      expect_that(!s_ovf, "overflow_err cleared by the next message");
      s_stop = 1; @(negedge clk); s_stop = 0;
      repeat (20) begin
        if (s_done && s_last && s_first) nlast++;
        @(negedge clk);
      end
      expect_that(nlast == 1, "next message is padded normally");
    end
    expect_that(n_overflow == 1, "overflow happened");
    $display("mechanisms: length-only blocks=%0d multi-block messages=%0d overflow=%0d",
             n_lenblk, n_datablk, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
