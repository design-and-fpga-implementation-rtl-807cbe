// sha256_digest_update: hash value registers H0..H7 and the digest update.
//
// After the 64th round the working variables A..H are added word by word to
// the hash values of the previous block, H(i) = A..H + H(i-1), and the eight
// words are concatenated, H0 first, into the 256-bit digest. init loads the
// initial hash value H(0) at the start of a message; update performs the
// eight additions in one clock. hash shows the registers as a struct for the
// next block's working-variable load.
// The equations follow the source; using eight plain adders in one cycle
// (instead of the round compressors) is this design's choice.
module sha256_digest_update
  import sha256_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          init,
  input  logic          update,
  input  state_t        work,
  output state_t        hash,
  output logic [255:0]  digest
);

  state_t h_q;

  always_ff @(posedge clk) begin
    if (rst || init) begin
      h_q <= H_INIT;
    end else if (update) begin
      h_q.a <= h_q.a + work.a;
      h_q.b <= h_q.b + work.b;
      h_q.c <= h_q.c + work.c;
      h_q.d <= h_q.d + work.d;
      h_q.e <= h_q.e + work.e;
      h_q.f <= h_q.f + work.f;
      h_q.g <= h_q.g + work.g;
      h_q.h <= h_q.h + work.h;
    end
  end

  assign hash   = h_q;
  assign digest = {h_q.a, h_q.b, h_q.c, h_q.d, h_q.e, h_q.f, h_q.g, h_q.h};

endmodule
