// tb_sha256_digest_update: init loads H(0); each update adds the working
// variables word by word; the digest is H0..H7 concatenated, H0 on top.
module tb_sha256_digest_update;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;
  logic clk = 0, rst, init, update;
  state_t work, hash;
  logic [255:0] digest;
  st_t exp;
  int checks = 0, failures = 0;

  sha256_digest_update dut (.clk, .rst, .init, .update, .work, .hash, .digest);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string what);
    checks++;
    if (digest !== st2vec(exp)) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, digest, st2vec(exp));
    end
  endtask

  initial begin
    rst = 1; init = 0; update = 0; work = '0;
    @(posedge clk); #1 rst = 0;
    init = 1; @(posedge clk); #1 init = 0;
    exp = iv(); cmp("init");
    for (int r = 0; r < 20; r++) begin
      st_t wv;
      for (int i = 0; i < 8; i++) wv[i] = $urandom;
      work = {wv[0], wv[1], wv[2], wv[3], wv[4], wv[5], wv[6], wv[7]};
      update = (r % 3 != 2);
      @(posedge clk); #1;
      if (update) for (int i = 0; i < 8; i++) exp[i] = exp[i] + wv[i];
      update = 0;
      cmp("update");
      checks++;
      if (hash.a !== exp[0] || hash.h !== exp[7]) begin
        failures++;
        $display("FAIL hash struct");
      end
    end
    init = 1; @(posedge clk); #1 init = 0;
    exp = iv(); cmp("re-init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
