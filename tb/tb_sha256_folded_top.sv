// tb_sha256_folded_top: end-to-end test of the byte-serial folded SHA-256
// hasher at its default configuration.
// Messages go in character by character (waiting for ready) and every digest
// is compared with the reference model and, for four messages, with
// published values: the one-character message 8'b11110000, the empty
// message, "abc" and the 56-character two-block standard message. Messages
// at the block boundaries (55, 56, 63, 64, 119, 120 characters) and random
// messages of 0..300 characters follow, several sent while the core is still
// hashing, so blocks wait in the pre-processing stage. The latency from
// byte_stop to digest_valid (148 clocks for one block) is checked. Each
// mechanism (single block, chained blocks, extra length-only block, a block
// waiting for the core) is counted and must occur.
module tb_sha256_folded_top;
  import sha256_ref_pkg::*;
  logic clk = 0, rst, byte_rdy, byte_stop, ready, overflow_err, digest_valid;
  logic [7:0] data_in;
  logic [255:0] digest;
  int checks = 0, failures = 0;
  int n_digest = 0, n_single = 0, n_multi = 0, n_lenblk = 0, n_wait = 0;
  int n_msgs = 0;
  int cyc = 0;
  logic [255:0] exp_q[$];
  // message lengths around the block boundaries
  int lens[6] = '{55, 56, 63, 64, 119, 120};

  sha256_folded_top dut (.clk, .rst, .byte_rdy, .byte_stop, .data_in, .ready,
                         .overflow_err, .digest_valid, .digest);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #50000000;
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

  // Scoreboard: every digest_valid must match the next expected digest.
  always @(negedge clk) begin
    if (!rst && digest_valid) begin
      checks++;
      n_digest++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected digest %h", digest);
      end else begin
        logic [255:0] e;
        e = exp_q.pop_front();
        if (digest !== e) begin
          failures++;
          $display("FAIL digest %h\n        expected %h", digest, e);
        end
      end
    end
    if (!rst && overflow_err) begin
      failures++;
      $display("FAIL overflow_err on a legal message");
    end
  end

  task automatic send(byte unsigned m[$]);
    foreach (m[i]) begin
      while (!ready) @(negedge clk);
      byte_rdy = 1; data_in = m[i];
      @(negedge clk);
      byte_rdy = 0;
    end
    while (!ready) @(negedge clk);
    byte_stop = 1;
    @(negedge clk);
    byte_stop = 0;
  endtask

  task automatic hash_msg(byte unsigned m[$]);
    int nb = num_blocks(m.size());
    // a digest still outstanding means the core is busy with the previous
    // message, so this message's first block must wait for it
    if (exp_q.size() != 0) n_wait++;
    exp_q.push_back(hash(m));
    n_msgs++;
    if (nb == 1) n_single++;
    else n_multi++;
    if (m.size() % 64 > 55) n_lenblk++;
    send(m);
  endtask

  task automatic wait_idle();
    int guard = 0;
    while (exp_q.size() != 0 && guard < 5000) begin
      @(negedge clk);
      guard++;
    end
    @(negedge clk);
  endtask

  function automatic void rnd_msg(ref byte unsigned m[$], input int n);
    m = {};
    for (int i = 0; i < n; i++) m.push_back(8'($urandom));
  endfunction

  initial begin
    byte unsigned m[$];
    string s;
    int t0;
    rst = 1; byte_rdy = 0; byte_stop = 0; data_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    // one character, 11110000
    m = '{8'hF0};
    expect_that(hash(m) == 256'hfde502858306c235a3121e42326b53228b7ef4690eeed92a2b2eafe73c03a3ef,
                "reference model, 8'hF0");
    hash_msg(m);
    t0 = cyc - 1;                 // the clock cycle that held byte_stop
    while (!digest_valid) @(negedge clk);
    expect_that(cyc - t0 == 148, $sformatf("latency %0d clocks, expected 148", cyc - t0));
    expect_that(digest == 256'hfde502858306c235a3121e42326b53228b7ef4690eeed92a2b2eafe73c03a3ef,
                "digest of 8'hF0");
    wait_idle();

    m = {};
    hash_msg(m);
    wait_idle();
    expect_that(digest == 256'he3b0c44298fc1c149afbf4c8996fb92427ae41e4649b934ca495991b7852b855,
                "digest of the empty message");
    m = '{8'h61, 8'h62, 8'h63};
    hash_msg(m);
    wait_idle();
    expect_that(digest == 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad,
                "digest of abc");
    s = "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq";
    m = {};
    for (int i = 0; i < s.len(); i++) m.push_back(s[i]);
    hash_msg(m);
    wait_idle();
    expect_that(digest == 256'h248d6a61d20638b8e5c026930c3e6039a33ce45964ff2167f6ecedd419db06c1,
                "digest of the 56-character two-block message");

    // block boundaries
    foreach (lens[i]) begin
      rnd_msg(m, lens[i]);
      hash_msg(m);
    end
    wait_idle();

    // random messages back to back (core busy while the next one arrives)
    for (int r = 0; r < 16; r++) begin
      int n;
      n = (r % 2 == 0) ? $urandom_range(55) : $urandom_range(300);
      rnd_msg(m, n);
      hash_msg(m);
      if (r % 4 == 3) wait_idle();
    end
    wait_idle();

    expect_that(exp_q.size() == 0, "all digests delivered");
    expect_that(n_digest == n_msgs, $sformatf("digest count %0d of %0d", n_digest, n_msgs));
    expect_that(n_single > 0, "single-block messages");
    expect_that(n_multi > 0, "chained multi-block messages");
    expect_that(n_lenblk > 0, "extra length-only blocks");
    expect_that(n_wait > 0, "messages waiting for a busy core");
    $display("mechanisms: digests=%0d single=%0d multi=%0d length-only=%0d waited=%0d",
             n_digest, n_single, n_multi, n_lenblk, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
