// sha256_pkg: types, constants and bit-level functions shared by the folded
// SHA-256 hasher.
//
// The logical functions are those of SHA-256 (FIPS 180-4): the schedule
// functions sigma0/sigma1, the round functions Sigma0/Sigma1, Ch and Maj.
// They are pure wiring plus XOR/AND, so every block that needs one calls it
// here instead of repeating the rotate amounts. The initial hash value H(0)
// is the first 32 bits of the fractional parts of the square roots of the
// first eight primes; the round constants live in sha256_k_rom.
package sha256_pkg;

  localparam int unsigned WORD_W = 32;   // SHA-256 word size
  localparam int unsigned ROUNDS = 64;   // rounds per 512-bit block
  localparam int unsigned BLOCK_WORDS = 16;  // 32-bit words per block
  localparam int unsigned ITER_W = 7;    // width of the round counter

  typedef logic [WORD_W-1:0] word_t;

  // Working variables A..H of the compression function.
  typedef struct packed {
    word_t a, b, c, d, e, f, g, h;
  } state_t;

  // Initial hash value H0..H7 (sqrt of the first 8 primes, fraction bits).
  localparam state_t H_INIT = '{
    a: 32'h6a09e667, b: 32'hbb67ae85, c: 32'h3c6ef372, d: 32'ha54ff53a,
    e: 32'h510e527f, f: 32'h9b05688c, g: 32'h1f83d9ab, h: 32'h5be0cd19
  };

  function automatic word_t rotr(word_t x, int unsigned n);
    return (x >> n) | (x << (WORD_W - n));
  endfunction

  // sigma0(x) = ROTR7 ^ ROTR18 ^ SHR3
  function automatic word_t ssig0(word_t x);
    return rotr(x, 7) ^ rotr(x, 18) ^ (x >> 3);
  endfunction

  // sigma1(x) = ROTR17 ^ ROTR19 ^ SHR10
  function automatic word_t ssig1(word_t x);
    return rotr(x, 17) ^ rotr(x, 19) ^ (x >> 10);
  endfunction

  // Sigma0(x) = ROTR2 ^ ROTR13 ^ ROTR22
  function automatic word_t bsig0(word_t x);
    return rotr(x, 2) ^ rotr(x, 13) ^ rotr(x, 22);
  endfunction

  // Sigma1(x) = ROTR6 ^ ROTR11 ^ ROTR25
  function automatic word_t bsig1(word_t x);
    return rotr(x, 6) ^ rotr(x, 11) ^ rotr(x, 25);
  endfunction

  function automatic word_t ch(word_t x, word_t y, word_t z);
    return (x & y) ^ (~x & z);
  endfunction

  function automatic word_t maj(word_t x, word_t y, word_t z);
    return (x & y) ^ (x & z) ^ (y & z);
  endfunction

endpackage
