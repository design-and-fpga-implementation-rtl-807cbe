// tb_sha256_core: one block at a time into the folded core. Random blocks
// with first=1 and a two-block message chained with first=0 (the 56-character
// standard test message) are hashed; digests must match the reference,
// digest_valid must pulse only for a block started with last high, and
// done must come exactly 130 clocks after the start cycle.
module tb_sha256_core;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;
  logic clk = 0, rst, word_valid, start, first, last, ready, done, digest_valid;
  word_t word_in;
  logic [255:0] digest;
  int checks = 0, failures = 0;

  sha256_core dut (.clk, .rst, .word_valid, .word_in, .start, .first, .last,
                   .ready, .done, .digest_valid, .digest);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hash_block(blk_t m, bit f, bit l, logic [255:0] exp);
    int cyc = 0;
    for (int i = 0; i < 16; i++) begin
      word_valid = 1; word_in = m[i];
      @(negedge clk);
    end
    word_valid = 0;
    checks++;
    if (!ready) begin
      failures++;
      $display("FAIL core not ready");
    end
    start = 1; first = f; last = l;
    @(negedge clk);
    start = 0; first = 1'($urandom_range(1)); last = 1'($urandom_range(1));
    cyc = 1;
    while (!done && cyc < 300) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 130) begin
      failures++;
      $display("FAIL latency %0d clocks, expected 130", cyc);
    end
    checks++;
    if (digest_valid !== l) begin
      failures++;
      $display("FAIL digest_valid %b for last=%b", digest_valid, l);
    end
    checks++;
    if (digest !== exp) begin
      failures++;
      $display("FAIL digest %h\n        expected %h", digest, exp);
    end
    @(negedge clk);
  endtask

  initial begin
    byte unsigned msg[$];
    string s;
    st_t h;
    s = "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq";
    rst = 1; word_valid = 0; word_in = '0; start = 0; first = 0; last = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 6; r++) begin
      blk_t m;
      for (int i = 0; i < 16; i++) m[i] = $urandom;
      hash_block(m, 1'b1, 1'b1, st2vec(block(iv(), m)));
    end
    // two-block message, second block chained on the first
    for (int i = 0; i < s.len(); i++) msg.push_back(s[i]);
    h = iv();
    h = block(h, pad_block(msg, 0));
    hash_block(pad_block(msg, 0), 1'b1, 1'b0, st2vec(h));
    h = block(h, pad_block(msg, 1));
    hash_block(pad_block(msg, 1), 1'b0, 1'b1, st2vec(h));
    checks++;
    if (digest !== 256'h248d6a61d20638b8e5c026930c3e6039a33ce45964ff2167f6ecedd419db06c1) begin
      failures++;
      $display("FAIL standard two-block vector");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
