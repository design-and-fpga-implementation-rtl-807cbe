// sha256_msg_schedule: message schedule window and operand generator.
//
// Holds the last sixteen schedule words W(t-16)..W(t-1) in a shift register
// (w[0] is the oldest). The four operands of the schedule recurrence
//     W(t) = sigma1(W(t-2)) + W(t-7) + sigma0(W(t-15)) + W(t-16)
// are offered to the shared right-hand 4-2 compressor of the round datapath,
// which adds them in phase 0 of round t and returns the sum as w_new. On the
// same clock edge (shift high) the window shifts and takes w_new in.
// For t < 16 W(t) is the message word M(t) itself: the window then holds
// M(t)..M(15),M(0)..M(t-1), the operands are 0, 0, 0 and w[0] = M(t), so the
// compressor passes M(t) through and the window rotates. After sixteen
// rotations it is back in order for t = 16.
// Loading: while load is high, load_word shifts in at the young end, so after
// sixteen loads M(0) is oldest.
//   op_s1, op_w7, op_s0, op_w16   compressor operands, combinational from the
//                                 window and t
// The recurrence and the sigma functions follow the source; the window
// organisation and the pass-through for t < 16 are this design's choice.
module sha256_msg_schedule
  import sha256_pkg::*;
(
  input  logic              clk,
  input  logic              load,
  input  word_t             load_word,
  input  logic              shift,
  input  word_t             w_new,
  input  logic [ITER_W-1:0] t,
  output word_t             op_s1,
  output word_t             op_w7,
  output word_t             op_s0,
  output word_t             op_w16
);

  word_t w [BLOCK_WORDS];

  always_ff @(posedge clk) begin
    if (load || shift) begin
      for (int i = 0; i < BLOCK_WORDS - 1; i++) w[i] <= w[i+1];
      w[BLOCK_WORDS-1] <= load ? load_word : w_new;
    end
  end

  always_comb begin
    if (t < ITER_W'(BLOCK_WORDS)) begin
      op_s1  = '0;
      op_w7  = '0;
      op_s0  = '0;
      op_w16 = w[0];
    end else begin
      op_s1  = ssig1(w[14]);   // W(t-2)
      op_w7  = w[9];           // W(t-7)
      op_s0  = ssig0(w[1]);    // W(t-15)
      op_w16 = w[0];           // W(t-16)
    end
  end

endmodule
