// sha256_ref_pkg: untimed SHA-256 reference for the testbenches.
//
// Written straight from the standard with ordinary 32-bit additions and no
// shared code with the design: the round constants are recomputed here from
// the cube roots of the first 64 primes and the initial hash value from the
// square roots of the first 8 primes. Provides message padding, the message
// schedule, one round, one block and a whole message.
package sha256_ref_pkg;

  typedef logic [31:0] w32_t;
  typedef w32_t        blk_t  [16];
  typedef w32_t        sched_t [64];
  typedef w32_t        st_t   [8];

  function automatic w32_t rr(w32_t x, int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic int nth_prime(int n);
    int cnt = 0;
    for (int p = 2; ; p++) begin
      bit isp = 1;
      for (int d = 2; d * d <= p; d++) if (p % d == 0) isp = 0;
      if (isp) begin
        if (cnt == n) return p;
        cnt++;
      end
    end
  endfunction

  // frac(root) * 2^32, root = p^(1/deg), refined in integer arithmetic.
  function automatic w32_t root_frac(int p, int deg);
    real r = (deg == 2) ? $sqrt(real'(p)) : $pow(real'(p), 1.0 / 3.0);
    longint unsigned ip = longint'($floor(r));
    real f = (r - real'(ip)) * 4294967296.0;
    return w32_t'(longint'($floor(f)));
  endfunction

  function automatic w32_t kconst(int t);
    return root_frac(nth_prime(t), 3);
  endfunction

  function automatic st_t iv();
    st_t h;
    for (int i = 0; i < 8; i++) h[i] = root_frac(nth_prime(i), 2);
    return h;
  endfunction

  function automatic sched_t expand(blk_t m);
    sched_t w;
    for (int t = 0; t < 64; t++) begin
      if (t < 16) w[t] = m[t];
      else w[t] = (rr(w[t-2], 17) ^ rr(w[t-2], 19) ^ (w[t-2] >> 10)) + w[t-7] +
                  (rr(w[t-15], 7) ^ rr(w[t-15], 18) ^ (w[t-15] >> 3)) + w[t-16];
    end
    return w;
  endfunction

  // One round on s = {a,b,c,d,e,f,g,h} (index 0 = a).
  function automatic st_t round(st_t s, w32_t k, w32_t w);
    st_t n;
    w32_t t1, t2;
    t1 = s[7] + (rr(s[4], 6) ^ rr(s[4], 11) ^ rr(s[4], 25)) +
         ((s[4] & s[5]) ^ (~s[4] & s[6])) + k + w;
    t2 = (rr(s[0], 2) ^ rr(s[0], 13) ^ rr(s[0], 22)) +
         ((s[0] & s[1]) ^ (s[0] & s[2]) ^ (s[1] & s[2]));
    n[0] = t1 + t2; n[1] = s[0]; n[2] = s[1]; n[3] = s[2];
    n[4] = s[3] + t1; n[5] = s[4]; n[6] = s[5]; n[7] = s[6];
    return n;
  endfunction

  function automatic st_t block(st_t h, blk_t m);
    sched_t w = expand(m);
    st_t s = h;
    for (int t = 0; t < 64; t++) s = round(s, kconst(t), w[t]);
    for (int i = 0; i < 8; i++) s[i] = s[i] + h[i];
    return s;
  endfunction

  function automatic logic [255:0] st2vec(st_t s);
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[255 - 32*i -: 32] = s[i];
    return v;
  endfunction

  // Padded block number b of message msg.
  function automatic blk_t pad_block(byte unsigned msg[$], int b);
    blk_t m;
    int n = msg.size();
    int nblk = (n + 9 + 63) / 64;
    longint unsigned bits = 64'(n) * 8;
    for (int i = 0; i < 64; i++) begin
      int idx = 64 * b + i;
      byte unsigned v;
      if (idx < n) v = msg[idx];
      else if (idx == n) v = 8'h80;
      else if (b == nblk - 1 && i >= 56) v = bits[8*(63-i) +: 8];
      else v = 8'h00;
      m[i/4][8*(3 - i%4) +: 8] = v;
    end
    return m;
  endfunction

  function automatic int num_blocks(int n);
    return (n + 9 + 63) / 64;
  endfunction

  function automatic logic [255:0] hash(byte unsigned msg[$]);
    st_t h = iv();
    for (int b = 0; b < num_blocks(msg.size()); b++) h = block(h, pad_block(msg, b));
    return st2vec(h);
  endfunction

endpackage
