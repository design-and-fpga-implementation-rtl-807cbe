// sha256_folded_datapath: the folded round datapath (digest calculation).
//
// One SHA-256 round needs seven 32-bit additions:
//     T1 = H + Sigma1(E) + Ch(E,F,G) + K(t) + W(t)     T2 = Sigma0(A) + Maj(A,B,C)
//     A' = T1 + T2                                      E' = D + T1
// plus three more for the schedule word W(t). Here they are done by two
// shared word-level 4-2 adder compressors, each with a 2:1 multiplexer in
// front of every operand, over two clock cycles per round:
//
//   phase 0  left : a0..d0 = H, K(t), Sigma1(E), Ch(E,F,G)  -> P  = T1 - W(t)
//            right: a1..d1 = sigma1(W(t-2)), W(t-7), sigma0(W(t-15)), W(t-16)
//                                                          -> W(t)
//   phase 1  left : a0..d0 = 0, D, W(t), P                -> E' = D + T1
//            right: a1..d1 = P, W(t), Sigma0(A), Maj(A,B,C) -> A' = T1 + T2
//
// Each compressor has an output register (l_sum_q, r_sum_q) that holds its
// phase-0 result for phase 1; that register is the pipeline stage that cuts
// the round into two paths of one 4-2 compressor and one adder each. At the
// end of phase 1, E' and A' enter the register chains H<-G<-F<-E<-E' and
// D<-C<-B<-A<-A'. At the end of phase 0 the right sum W(t) also goes to the
// message schedule (w_new).
//   init, h_init   load A..H (start of a block)
//   round_en, phase, k   round control and K(t)
//   op_*           schedule operands from sha256_msg_schedule
//   state          A..H
// Only the binary sum of each compressor is used; their redundant
// sum_vec/carry_vec outputs are left open on purpose.
// Two shared compressors with multiplexed operands, the operand pairs of
// each multiplexer (K(t)/D, sigma0(W(t-15))/Sigma0(A), W(t-16)/Maj, W(t-7)/
// right-hand feedback) and the sums feeding E and A follow the source
// figure; the zero operand in the left phase-1 slot and the left-sum
// operand of the right compressor in phase 1 are this design's choice.
module sha256_folded_datapath
  import sha256_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   init,
  input  state_t h_init,
  input  logic   round_en,
  input  logic   phase,
  input  word_t  k,
  input  word_t  op_s1,
  input  word_t  op_w7,
  input  word_t  op_s0,
  input  word_t  op_w16,
  output word_t  w_new,
  output state_t state
);

  state_t s_q;
  word_t  l_sum_q, r_sum_q;     // compressor output registers
  word_t  a0, b0, c0, d0;       // left compressor operands (after muxes)
  word_t  a1, b1, c1, d1;       // right compressor operands (after muxes)
  word_t  l_sum, r_sum;

  always_comb begin
    if (!phase) begin
      a0 = s_q.h;
      b0 = k;
      c0 = bsig1(s_q.e);
      d0 = ch(s_q.e, s_q.f, s_q.g);
      a1 = op_s1;
      b1 = op_w7;
      c1 = op_s0;
      d1 = op_w16;
    end else begin
      a0 = '0;
      b0 = s_q.d;
      c0 = r_sum_q;             // W(t)
      d0 = l_sum_q;             // P
      a1 = l_sum_q;             // P
      b1 = r_sum_q;             // W(t)
      c1 = bsig0(s_q.a);
      d1 = maj(s_q.a, s_q.b, s_q.c);
    end
  end

  csa42_adder #(.WIDTH(WORD_W)) u_left (
    .a(a0), .b(b0), .c(c0), .d(d0),
    .sum(l_sum), .sum_vec(), .carry_vec()
  );

  csa42_adder #(.WIDTH(WORD_W)) u_right (
    .a(a1), .b(b1), .c(c1), .d(d1),
    .sum(r_sum), .sum_vec(), .carry_vec()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      s_q     <= '0;
      l_sum_q <= '0;
      r_sum_q <= '0;
    end else if (init) begin
      s_q <= h_init;
    end else if (round_en) begin
      l_sum_q <= l_sum;
      r_sum_q <= r_sum;
      if (phase) begin
        s_q.h <= s_q.g;
        s_q.g <= s_q.f;
        s_q.f <= s_q.e;
        s_q.e <= l_sum;
        s_q.d <= s_q.c;
        s_q.c <= s_q.b;
        s_q.b <= s_q.a;
        s_q.a <= r_sum;
      end
    end
  end

  assign w_new = r_sum;
  assign state = s_q;

endmodule
