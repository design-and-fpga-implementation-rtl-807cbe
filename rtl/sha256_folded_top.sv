// sha256_folded_top: byte-serial SHA-256 hasher with a folded round datapath.
//
// The per-block done of the core is not needed here and is left open.
// A message enters one character per clock (data_in with byte_rdy), ended by
// a byte_stop pulse. The pre-processing stage pads it into 512-bit blocks and
// streams each block's sixteen words into the core, which runs the message
// schedule and 64 rounds on two shared 4-2 adder compressors, two clocks per
// round, and adds the result into the hash value of the previous block (the
// initial hash value for a message's first block).
// digest_valid pulses when digest holds the 256-bit hash of the whole
// message (H0 in bits 255:224); it stays valid until the next block starts.
// Timing of the last block (core idle): 1 clock to leave collection, 16 word
// clocks, 1 clock of padding_done, then 130 clocks in the core: for a message
// of at most 55 characters digest_valid comes 148 clocks after the byte_stop
// cycle. Every further block needs 18 hand-off clocks with ready low and 130
// core clocks; a finished block waits while the core is busy.
// overflow_err reports a message longer than the 64-bit length field allows;
// it yields no digest. ready is high while characters are accepted.
module sha256_folded_top (
  input  logic         clk,
  input  logic         rst,
  input  logic         byte_rdy,
  input  logic         byte_stop,
  input  logic [7:0]   data_in,
  output logic         ready,
  output logic         overflow_err,
  output logic         digest_valid,
  output logic [255:0] digest
);

  logic        core_ready, flag_0_15, padding_done, first_blk, last_blk;
  logic [31:0] padd_out;

  sha256_padder u_pad (
    .clk, .rst, .byte_rdy, .byte_stop, .data_in,
    .core_ready, .ready, .overflow_err,
    .flag_0_15, .padd_out, .padding_done, .first_blk, .last_blk
  );

  sha256_core u_core (
    .clk, .rst,
    .word_valid (flag_0_15),
    .word_in    (padd_out),
    .start      (padding_done),
    .first      (first_blk),
    .last       (last_blk),
    .ready      (core_ready),
    .done       (),
    .digest_valid,
    .digest
  );

endmodule
