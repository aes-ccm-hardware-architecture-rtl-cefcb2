// aes_ref_pkg: reference model of AES-128 encryption and AES-CCM for the
// testbenches. It is written independently of the RTL: the S-box inverse is
// computed as a^254 by square-and-multiply (the RTL searches for the
// inverse), and the cipher works on whole 128-bit blocks.
// Blocks are logic [127:0] with byte 0 of the block in bits [127:120].
package aes_ref_pkg;

  typedef logic [127:0] blk_t;

  function automatic logic [7:0] r_xt(input logic [7:0] a);
    return (a << 1) ^ ((a & 8'h80) != 0 ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] r_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 0;
    logic [7:0] aa = a;
    logic [7:0] bb = b;
    while (bb != 0) begin
      if (bb[0]) p ^= aa;
      aa = r_xt(aa);
      bb >>= 1;
    end
    return p;
  endfunction

  function automatic logic [7:0] r_sbox(input logic [7:0] a);
    logic [7:0] inv = 8'h01;
    logic [7:0] sq = a;
    logic [7:0] b;
    // a^254 = a^(2+4+8+16+32+64+128)
    for (int i = 1; i < 8; i++) begin
      sq = r_mul(sq, sq);
      inv = r_mul(inv, sq);
    end
    b = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]}
        ^ {inv[3:0], inv[7:4]};
    return b ^ 8'h63;
  endfunction

  function automatic logic [7:0] get_b(input blk_t x, input int i);
    return x[127 - 8*i -: 8];
  endfunction

  function automatic blk_t set_b(input blk_t x, input int i, input logic [7:0] v);
    blk_t y = x;
    y[127 - 8*i -: 8] = v;
    return y;
  endfunction

  // Next round key from key k with round constant rc.
  function automatic blk_t next_rk(input blk_t k, input logic [7:0] rc);
    logic [31:0] w [4];
    logic [31:0] t;
    blk_t n;
    for (int i = 0; i < 4; i++) w[i] = k[127 - 32*i -: 32];
    t = {r_sbox(w[3][23:16]) ^ rc, r_sbox(w[3][15:8]), r_sbox(w[3][7:0]),
         r_sbox(w[3][31:24])};
    w[0] ^= t;
    for (int i = 1; i < 4; i++) w[i] ^= w[i-1];
    n = {w[0], w[1], w[2], w[3]};
    return n;
  endfunction

  function automatic blk_t sub_shift(input blk_t s);
    blk_t o = '0;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o = set_b(o, 4*c + r, r_sbox(get_b(s, 4*((c + r) % 4) + r)));
    return o;
  endfunction

  function automatic blk_t mix(input blk_t s);
    blk_t o = '0;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o = set_b(o, 4*c + r,
                  r_mul(8'h02, get_b(s, 4*c + r)) ^ r_mul(8'h03, get_b(s, 4*c + (r+1)%4))
                  ^ get_b(s, 4*c + (r+2)%4) ^ get_b(s, 4*c + (r+3)%4));
    return o;
  endfunction

  // State entering round r (r = 1..10) and round key r, for cycle models.
  function automatic blk_t state_before(input blk_t key, input blk_t pt, input int r);
    blk_t s = pt ^ key;
    blk_t k = key;
    logic [7:0] rc = 8'h01;
    for (int i = 1; i < r; i++) begin
      k = next_rk(k, rc);
      rc = r_xt(rc);
      s = mix(sub_shift(s)) ^ k;
    end
    return s;
  endfunction

  function automatic blk_t round_key(input blk_t key, input int r);
    blk_t k = key;
    logic [7:0] rc = 8'h01;
    for (int i = 1; i <= r; i++) begin
      k = next_rk(k, rc);
      rc = r_xt(rc);
    end
    return k;
  endfunction

  function automatic blk_t aes_enc(input blk_t key, input blk_t pt);
    return sub_shift(state_before(key, pt, 10)) ^ round_key(key, 10);
  endfunction

  // Collision count the shared S-box sees while encrypting pt: in step
  // k < 4 of rounds 1..9 the data byte is the state byte ShiftRows brings to
  // position k and the key byte is byte {13,14,15,12}[k] of round key r.
  function automatic int collisions(input blk_t key, input blk_t pt);
    int n = 0;
    for (int r = 1; r <= 9; r++) begin
      blk_t s = state_before(key, pt, r);
      blk_t k = round_key(key, r);
      for (int st = 0; st < 4; st++) begin
        logic [7:0] d = get_b(s, 4*((0 + st) % 4) + st);
        logic [7:0] kb = get_b(k, 12 + (st + 1) % 4);
        if (d[7:6] == kb[7:6]) n++;
      end
    end
    return n;
  endfunction

  // Collisions in the overlapped FINAL/LOAD phase: unload step k (12..15)
  // substitutes the state byte for output k while the new key byte k is
  // substituted.
  function automatic int collisions_overlap(input blk_t key, input blk_t pt,
                                            input blk_t nkey);
    int n = 0;
    blk_t s = state_before(key, pt, 10);
    for (int kk = 12; kk < 16; kk++) begin
      logic [7:0] d = get_b(s, 4*(((kk/4) + (kk%4)) % 4) + kk%4);
      logic [7:0] kb = get_b(nkey, kk);
      if (d[7:6] == kb[7:6]) n++;
    end
    return n;
  endfunction

  typedef logic [7:0] bq_t [$];

  // CCM with L = 2 (13-byte nonce) and an M-byte MIC, from the standard's
  // definition: CBC-MAC over B0, the length-prefixed header and the payload,
  // then CTR encryption of the payload with A(1).. and of the tag with A(0).
  function automatic void ccm_ref(input blk_t key, input logic [103:0] nonce,
                                  input bq_t a, input bq_t m, input int mlen_mic,
                                  output bq_t c, output bq_t u);
    blk_t x, b, ai, s;
    bq_t  ab;
    c = {};
    u = {};
    b = {8'(8'h01 | (((mlen_mic - 2) / 2) << 3) | (a.size() > 0 ? 8'h40 : 8'h00)),
         nonce, 8'h00, 8'(m.size())};
    x = aes_enc(key, b);
    if (a.size() > 0) begin
      ab = {8'h00, 8'(a.size())};
      foreach (a[i]) ab.push_back(a[i]);
      while (ab.size() % 16 != 0) ab.push_back(8'h00);
      for (int blk = 0; blk < ab.size() / 16; blk++) begin
        b = '0;
        for (int i = 0; i < 16; i++) b = set_b(b, i, ab[16*blk + i]);
        x = aes_enc(key, x ^ b);
      end
    end
    for (int blk = 0; blk < (m.size() + 15) / 16; blk++) begin
      b = '0;
      for (int i = 0; i < 16; i++)
        if (16*blk + i < m.size()) b = set_b(b, i, m[16*blk + i]);
      x = aes_enc(key, x ^ b);
      ai = {8'h01, nonce, 16'(blk + 1)};
      s = aes_enc(key, ai);
      for (int i = 0; i < 16; i++)
        if (16*blk + i < m.size()) c.push_back(get_b(b, i) ^ get_b(s, i));
    end
    s = aes_enc(key, {8'h01, nonce, 16'h0000});
    for (int i = 0; i < mlen_mic; i++) u.push_back(get_b(x, i) ^ get_b(s, i));
  endfunction

endpackage
