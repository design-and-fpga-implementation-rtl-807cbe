// sha256_padder: pre-processing, turns a byte-serial message of any length
// into padded 512-bit blocks, each streamed as sixteen 32-bit words.
//
// Characters arrive as 8-bit data_in with byte_rdy high; a byte_stop pulse
// ends the message. Characters are gathered in a 64-byte buffer. A full
// buffer is sent on as a plain data block. At byte_stop the rest is padded
// as SHA-256 requires: a single 1 bit (the byte 8'h80), zeros, and the
// message length in bits as a 64-bit big-endian number in the last eight
// bytes of the last block. If the remainder holds more than 55 characters
// the length does not fit behind it, and one more block of zeros and length
// follows. A one-character message 8'b11110000 thus gives the first word
// 32'b11110000_10000000_00000000_00000000.
// Hand-off: a finished block waits for core_ready; then padd_out carries
// M(0)..M(15) on sixteen consecutive clocks with flag_0_15 high, and
// padding_done is high on the clock after M(15), together with first_blk
// (first block of a message: start from the initial hash value) and
// last_blk (its digest is the message digest). ready is high while
// characters and byte_stop are accepted; inputs offered while it is low are
// ignored.
// The message length is counted in LEN_W - 3 bits of bytes (LEN_W = 64 is
// the standard's limit). A character beyond that count sets overflow_err;
// the message then produces no last block, and overflow_err stays high until
// the next message begins (its first character, or its byte_stop if empty).
// The padding rule, the 8-bit in / 32-bit out widths, the 512-bit blocks and
// the port names byte_rdy, byte_stop, data_in, overflow_err, flag_0_15,
// padd_out and padding_done follow the source; the handshake, the timing and
// the meaning given to overflow_err are this design's choice.
module sha256_padder
  import sha256_pkg::*;
#(
  parameter int unsigned LEN_W = 64
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       byte_rdy,
  input  logic       byte_stop,
  input  logic [7:0] data_in,
  input  logic       core_ready,
  output logic       ready,
  output logic       overflow_err,
  output logic       flag_0_15,
  output word_t      padd_out,
  output logic       padding_done,
  output logic       first_blk,
  output logic       last_blk
);

  typedef enum logic [1:0] {S_COLLECT, S_WAIT, S_SEND, S_DONE} state_e;

  localparam int unsigned CNT_W = LEN_W - 3;   // byte counter width

  state_e           state_q;
  logic [7:0]       buf_q [64];
  logic [6:0]       cnt_q;        // characters in the buffer, 0..64
  logic [CNT_W-1:0] tot_q;        // characters in the message so far
  logic             mark_q;       // block carries the 8'h80 byte at cnt_q
  logic             len_q;        // block carries the length field
  logic             owe_len_q;    // a zeros-and-length block must follow
  logic             first_q;      // next block is a message's first
  logic             last_q;       // block being sent is a message's last
  logic             drop_q;       // current message is over-long
  logic [3:0]       widx_q;       // word being sent
  logic [63:0]      bit_len;

  assign bit_len = 64'(tot_q) << 3;

  // Byte at position idx of the block being sent.
  function automatic logic [7:0] pad_byte(int unsigned idx);
    if (idx < 32'(cnt_q))                return buf_q[idx];
    else if (idx == 32'(cnt_q) && mark_q) return 8'h80;
    else if (idx >= 56 && len_q)         return bit_len[8*(63-idx) +: 8];
    else                                 return 8'h00;
  endfunction

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      padd_out[8*(3-j) +: 8] = pad_byte(4 * 32'(widx_q) + 32'(j));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q      <= S_COLLECT;
      cnt_q        <= '0;
      tot_q        <= '0;
      mark_q       <= 1'b0;
      len_q        <= 1'b0;
      owe_len_q    <= 1'b0;
      first_q      <= 1'b1;
      last_q       <= 1'b0;
      drop_q       <= 1'b0;
      widx_q       <= '0;
      overflow_err <= 1'b0;
      for (int i = 0; i < 64; i++) buf_q[i] <= '0;
    end else begin
      unique case (state_q)
        S_COLLECT: begin
          if (byte_stop) begin
            if (drop_q) begin
              // the over-long message ends: nothing more is sent
              cnt_q   <= '0;
              tot_q   <= '0;
              drop_q  <= 1'b0;
              first_q <= 1'b1;
            end else begin
              overflow_err <= 1'b0;
              mark_q       <= 1'b1;
              len_q        <= (cnt_q <= 7'd55);
              owe_len_q    <= (cnt_q > 7'd55);
              last_q       <= (cnt_q <= 7'd55);
              state_q      <= S_WAIT;
            end
          end else if (byte_rdy) begin
            if (!drop_q) overflow_err <= 1'b0;   // a new message has begun
            if (drop_q) begin
              // rest of an over-long message: discarded
            end else if (tot_q == '1) begin
              overflow_err <= 1'b1;
              drop_q       <= 1'b1;
            end else begin
              buf_q[cnt_q[5:0]] <= data_in;
              cnt_q             <= cnt_q + 1'b1;
              tot_q             <= tot_q + 1'b1;
              if (cnt_q == 7'd63) begin
                // buffer full: send it as a plain data block
                mark_q  <= 1'b0;
                len_q   <= 1'b0;
                last_q  <= 1'b0;
                state_q <= S_WAIT;
              end
            end
          end
        end
        S_WAIT: begin
          if (core_ready) begin
            state_q <= S_SEND;
            widx_q  <= '0;
          end
        end
        S_SEND: begin
          widx_q <= widx_q + 1'b1;
          if (widx_q == 4'd15) state_q <= S_DONE;
        end
        S_DONE: begin
          first_q <= last_q;
          cnt_q   <= '0;
          if (owe_len_q) begin
            // zeros and the length field, no data bytes
            owe_len_q <= 1'b0;
            mark_q    <= 1'b0;
            len_q     <= 1'b1;
            last_q    <= 1'b1;
            state_q   <= S_WAIT;
          end else begin
            if (last_q) tot_q <= '0;
            state_q <= S_COLLECT;
          end
        end
        default: state_q <= S_COLLECT;
      endcase
    end
  end

  assign ready        = (state_q == S_COLLECT);
  assign flag_0_15    = (state_q == S_SEND);
  assign padding_done = (state_q == S_DONE);
  assign first_blk    = first_q;
  assign last_blk     = last_q;

endmodule
