// aes_core: 8-bit AES-128 encryption core with a shared, sub-divided S-box.
//
// The core encrypts one 128-bit block with a 128-bit key, one byte per
// clock. Following the published architecture it is built from five units: the
// parallel-serial converter (ps_conv), the byte permutation unit
// (byte_perm), the S-box (shared_sbox, four sub-LUTs shared by data and key),
// the MixColumns multiplier (mixcol) and the key expansion unit (key_exp),
// plus the controller in this module. It implements the cipher only (no
// inverse cipher), as CCM needs only the forward direction.
//
// Operation, one step per cycle unless the S-box collides:
//   LOAD   16 steps: plaintext byte data_in and key byte key_in enter
//          together; the initial AddRoundKey is done on the way in. In steps
//          12..15 the key bytes of the last column are substituted for the
//          first round key.
//   ROUND  rounds 1..9, 16 steps each: step k substitutes the state byte
//          ShiftRows brings to position k; every fourth step a column is
//          mixed, XORed with the round key and written back. In steps 0..3
//          the key expansion substitutes its four bytes through the same
//          S-box.
//   FINAL  round 10 (SubBytes, ShiftRows, AddRoundKey) while the
//          ciphertext streams out on data_out (out_valid), byte 0 first. If
//          a next block is offered (in_valid) in the first FINAL step, it is
//          loaded in the same 16 steps, so back-to-back blocks take
//          160 cycles each.
// A step in which the data byte and a key byte need the same sub-LUT takes
// two cycles (key first, then data): at most 4 extra cycles per round, so a
// block takes 160..200 cycles back to back, as published. Without a
// next block waiting, the core takes 16 load cycles, 144 round cycles plus
// collisions, and 16 output cycles.
//
// Interface: in_valid/in_ready handshake for the (data_in, key_in) byte
// pair; data_out/out_valid have no back-pressure. collision pulses for each
// S-box collision cycle, done with the last ciphertext byte. Byte order is
// FIPS-197's (byte 0 = first byte of the block).
module aes_core
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  byte_t data_in,
  input  byte_t key_in,
  output logic  out_valid,
  output byte_t data_out,
  output logic  done,       // last ciphertext byte of a block
  output logic  busy,       // a block is inside the core
  output logic  collision   // S-box collision this cycle
);

  phase_t     phase;
  logic [3:0] k;          // step within the phase
  logic [3:0] rnd;        // round number in ROUND (1..9)
  logic       ovl_q;      // FINAL overlaps the load of the next block
  logic       kdone;      // the key lookup of this step was already served

  logic  loading, in_take, advance;
  logic  d_req, k_req, d_gnt, k_gnt;
  byte_t d_in, k_in, d_out, k_out, st_byte, lk_byte, rk_byte;
  col_t  mc_col, rk_col, wr_col;
  logic  wr_en;

  // ---------------------------------------------------------------- control
  assign loading = (phase == PH_LOAD) ||
                   (phase == PH_FINAL && ((k == 4'd0) ? in_valid : ovl_q));
  assign in_take = loading && in_valid;

  assign d_req = (phase == PH_ROUND) || (phase == PH_FINAL);
  assign k_req = !kdone && (((phase == PH_ROUND) && (k < 4'd4)) ||
                            (in_take && (k >= 4'd12)));
  assign d_in  = st_byte;
  assign k_in  = (phase == PH_ROUND) ? lk_byte : key_in;

  assign advance  = !collision && (!loading || in_valid);
  assign in_ready = loading && !collision;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_LOAD;
      k     <= 4'd0;
      rnd   <= 4'd0;
      ovl_q <= 1'b0;
      kdone <= 1'b0;
    end else if (collision) begin
      kdone <= 1'b1;
    end else if (advance) begin
      kdone <= 1'b0;
      k     <= k + 4'd1;
      if (phase == PH_FINAL && k == 4'd0) ovl_q <= in_valid;
      if (k == 4'd15) begin
        unique case (phase)
          PH_LOAD: begin
            phase <= PH_ROUND;
            rnd   <= 4'd1;
          end
          PH_ROUND: begin
            if (rnd == 4'd9) phase <= PH_FINAL;
            rnd <= rnd + 4'd1;
          end
          default: begin  // PH_FINAL
            phase <= ovl_q ? PH_ROUND : PH_LOAD;
            rnd   <= 4'd1;
          end
        endcase
      end
    end
  end

  // ---------------------------------------------------------------- S-box
  shared_sbox u_sbox (
    .d_req, .d_in, .k_req, .k_in,
    .d_gnt, .d_out, .k_gnt, .k_out, .collision
  );

  // ---------------------------------------------------------------- datapath
  byte_perm u_bpu (
    .clk, .rst_n,
    .rd_k   (k),
    .rd_byte(st_byte),
    .wr_en,
    .wr_col (k[3:2]),
    .wr_data(wr_col)
  );

  mixcol u_mc (
    .clk, .rst_n,
    .en  (advance && phase == PH_ROUND),
    .row (k[1:0]),
    .din (d_out),
    .dout(mc_col)
  );

  ps_conv u_psc (
    .clk, .rst_n,
    .load   (loading),
    .en     (advance && (loading || phase == PH_ROUND)),
    .row    (k[1:0]),
    .data_in,
    .key_in,
    .mc_col,
    .rk_col,
    .wr_en,
    .wr_col
  );

  key_exp u_kexp (
    .clk, .rst_n,
    .ld_en   (in_take && advance),
    .ld_k    (k),
    .ld_byte (key_in),
    .t_we    (k_gnt),
    .t_idx   ((phase == PH_ROUND) ? k[1:0] : k[1:0] - 2'd1),
    .t_val   (k_out),
    .upd     (advance && k == 4'd15 && (phase == PH_ROUND || loading)),
    .rnd_next(loading ? 4'd1 : rnd + 4'd1),
    .lk_step (k[1:0]),
    .lk_byte,
    .rk_c    (k[3:2]),
    .rk_col,
    .rk_k    (k),
    .rk_byte
  );

  // ---------------------------------------------------------------- output
  assign data_out  = d_out ^ rk_byte;
  assign out_valid = (phase == PH_FINAL) && advance;
  assign done      = out_valid && (k == 4'd15);
  assign busy      = !(phase == PH_LOAD && k == 4'd0);

  // A step that advances a data phase must have had its byte substituted.
  a_data_served: assert property (@(posedge clk) disable iff (!rst_n)
    (advance && d_req) |-> d_gnt);
  // A collision can only happen while a key byte is being substituted.
  a_collision_key: assert property (@(posedge clk) disable iff (!rst_n)
    collision |-> k_gnt && !kdone);

endmodule
