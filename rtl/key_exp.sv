// key_exp: key expansion unit of the 8-bit AES core (AES-128).
//
// Holds the current round key K (16 bytes) and computes the next one on the
// fly, so that only one round key is stored. The four S-box substitutions a
// round key needs (SubWord(RotWord(last column))) are done by the shared
// S-box: the controller asks for them one byte at a time (lk_byte gives the
// byte to substitute at step 0..3: K[13], K[14], K[15], K[12]) and writes the
// results back through t_we/t_idx/t_val into the 4-byte register T. With upd
// the unit replaces K by the next round key
//   w0' = w0 ^ T ^ {rcon(j),0,0,0},  w1' = w1 ^ w0',  w2' = w2 ^ w1',
//   w3' = w3 ^ w2'
// where j = rnd_next. While a new key is streamed in (ld_en), byte ld_k of
// K is replaced by ld_byte; an upd in the same cycle uses that byte and a T
// byte written in the same cycle, so the first round key is ready the cycle
// after the last key byte arrives. The published architecture names the unit; its
// organisation here is this design's.
//
// Timing: outputs are combinational from the registers; updates at the edge.
module key_exp
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ld_en,      // store key byte ld_k
  input  logic [3:0] ld_k,
  input  byte_t      ld_byte,
  input  logic       t_we,       // store a substituted byte into T
  input  logic [1:0] t_idx,
  input  byte_t      t_val,
  input  logic       upd,        // advance K to the next round key
  input  logic [3:0] rnd_next,   // index j of the round key being formed
  input  logic [1:0] lk_step,    // step 0..3 of the key S-box requests
  output byte_t      lk_byte,    // byte of K to substitute at lk_step
  input  logic [1:0] rk_c,       // round-key column select
  output col_t       rk_col,
  input  logic [3:0] rk_k,       // round-key byte select
  output byte_t      rk_byte
);

  byte_t K [16];
  byte_t T [4];
  byte_t base [16];
  byte_t t_eff [4];
  byte_t nk [16];

  always_comb begin
    for (int i = 0; i < 16; i++)
      base[i] = (ld_en && ld_k == 4'(i)) ? ld_byte : K[i];
    for (int i = 0; i < 4; i++)
      t_eff[i] = (t_we && t_idx == 2'(i)) ? t_val : T[i];
    for (int r = 0; r < 4; r++)
      nk[r] = base[r] ^ t_eff[r] ^ ((r == 0) ? rcon(rnd_next) : 8'h00);
    for (int i = 4; i < 16; i++)
      nk[i] = base[i] ^ nk[i-4];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) K[i] <= 8'h00;
      for (int i = 0; i < 4; i++) T[i] <= 8'h00;
    end else begin
      if (t_we) T[t_idx] <= t_val;
      if (upd) begin
        for (int i = 0; i < 16; i++) K[i] <= nk[i];
      end else if (ld_en) begin
        K[ld_k] <= ld_byte;
      end
    end
  end

  // RotWord order: substitute bytes 13, 14, 15, 12 of the key.
  assign lk_byte = K[{2'b11, lk_step + 2'd1}];

  for (genvar r = 0; r < 4; r++) begin : g_col
    assign rk_col[r] = K[{rk_c, 2'(r)}];
  end
  assign rk_byte = K[rk_k];

endmodule
