// aes_pkg: types, constants and small functions shared by the 8-bit AES-128
// encryption core and the AES-CCM engine built around it.
//
// State bytes are numbered as in FIPS-197: byte i of a 16-byte block sits in
// row i%4 and column i/4 of the state, and byte 0 is the first one streamed.
// The S-box contents are not stored as a pasted table: sbox_calc() derives
// each entry from its definition (multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1, followed by the affine map with constant 0x63), and the
// sub-LUTs evaluate it at elaboration time.
package aes_pkg;

  typedef logic [7:0] byte_t;
  typedef byte_t      col_t [4];   // one state column, row 0 first

  // Step of the core controller: LOAD streams a block in (initial
  // AddRoundKey), ROUND runs rounds 1..9, FINAL runs round 10 while the
  // ciphertext streams out (and, when a next block is offered, loads it).
  typedef enum logic [1:0] {PH_LOAD = 2'd0, PH_ROUND = 2'd1, PH_FINAL = 2'd2} phase_t;

  // Multiplication by x in GF(2^8).
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Full GF(2^8) multiplication (shift-and-add).
  function automatic byte_t gmul(input byte_t a, input byte_t b);
    byte_t p, x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  // S-box entry computed from its definition: inverse by search, then affine.
  function automatic byte_t sbox_calc(input byte_t a);
    byte_t inv, r;
    inv = 8'h00;
    for (int c = 1; c < 256; c++)
      if (gmul(a, byte_t'(c)) == 8'h01) inv = byte_t'(c);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8]
           ^ inv[(i + 7) % 8];
    return r ^ 8'h63;
  endfunction

  // ShiftRows read order: the byte that lands at position k (column k/4,
  // row k%4) of the shifted state comes from column (k/4 + k%4) mod 4.
  function automatic logic [3:0] sr_index(input logic [3:0] k);
    logic [1:0] c, r;
    c = k[3:2];
    r = k[1:0];
    return {c + r, r};
  endfunction

  // Round constant for round key j (j = 1..10).
  function automatic byte_t rcon(input logic [3:0] j);
    byte_t r;
    r = 8'h01;
    for (int i = 1; i < 10; i++)
      if (i < int'(j)) r = xtime(r);
    return r;
  endfunction

endpackage
