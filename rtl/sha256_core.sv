// sha256_core: folded SHA-256 compression of one 512-bit block.
//
// Joins the message schedule, the folded round datapath with its two shared
// 4-2 adder compressors, the round constant table, the round/phase sequencer
// and the digest update. A block is delivered as sixteen 32-bit words, M(0)
// first, each with word_valid high; then start begins hashing. first selects
// the initial hash value H(0) as chaining input (a new message); with first
// low the digest of the previous block is the chaining input, so messages
// of several blocks hash block after block. last, given with start, marks
// the block whose digest is the message digest.
// Timing: start is taken when ready is high; 64 rounds of two cycles follow,
// then one update cycle, and done pulses 130 clocks after the start cycle,
// with the digest (H0 in bits 255:224) valid from then until the next start.
// digest_valid is done for a block that was started with last high.
// Words may be loaded only while ready is high.
module sha256_core
  import sha256_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         word_valid,
  input  word_t        word_in,
  input  logic         start,
  input  logic         first,
  input  logic         last,
  output logic         ready,
  output logic         done,
  output logic         digest_valid,
  output logic [255:0] digest
);

  logic              init, round_en, phase, update, busy;
  logic [ITER_W-1:0] t;
  word_t             k, w_new;
  word_t             op_s1, op_w7, op_s0, op_w16;
  state_t            work, hash;

  sha256_fold_ctrl u_ctrl (
    .clk, .rst, .start, .init, .round_en, .phase, .t, .update, .busy, .done
  );

  sha256_msg_schedule u_sched (
    .clk,
    .load      (word_valid),
    .load_word (word_in),
    .shift     (round_en && !phase),
    .w_new,
    .t,
    .op_s1, .op_w7, .op_s0, .op_w16
  );

  sha256_k_rom u_krom (.t(t[5:0]), .k);

  sha256_folded_datapath u_dp (
    .clk, .rst, .init,
    .h_init (first ? H_INIT : hash),
    .round_en, .phase, .k,
    .op_s1, .op_w7, .op_s0, .op_w16,
    .w_new,
    .state  (work)
  );

  sha256_digest_update u_upd (
    .clk, .rst,
    .init   (init && first),
    .update,
    .work,
    .hash,
    .digest
  );

  logic last_q;

  always_ff @(posedge clk) begin
    if (rst)       last_q <= 1'b0;
    else if (init) last_q <= last;
  end

  assign ready        = !busy;
  assign digest_valid = done && last_q;

  // Words arrive only between blocks.
  a_load_idle: assert property (@(posedge clk) disable iff (rst) word_valid |-> !busy);

endmodule
