// ps_conv: parallel-serial converter of the 8-bit AES core.
//
// Sits between the byte-serial world and the column-parallel write port of
// the byte permutation unit, and performs AddRoundKey on the way:
//  * load (load = 1): plaintext and key arrive one byte per cycle; the
//    converter XORs them (the initial AddRoundKey), collects rows 0..2 of a
//    column in byte registers and, with row 3, presents the whole column;
//  * round (load = 0): the four bytes from the MixColumns multiplier arrive
//    in parallel with row 3 and are XORed with the round-key column.
// wr_en is raised for one cycle per column (en with row 3) and wr_col
// carries the column to the byte permutation unit. The published architecture names the
// unit and places the data_in port and the MixColumns outputs on it; doing
// AddRoundKey here is this design's choice.
//
// Timing: wr_en and wr_col are combinational from the inputs.
module ps_conv
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,     // 1: serial plaintext, 0: MixColumns column
  input  logic       en,       // a byte (load) or a column byte step (round)
  input  logic [1:0] row,
  input  byte_t      data_in,  // plaintext byte (load)
  input  byte_t      key_in,   // key byte (load)
  input  col_t       mc_col,   // MixColumns result (round, row 3)
  input  col_t       rk_col,   // round-key column (round)
  output logic       wr_en,
  output col_t       wr_col
);

  byte_t b [3];
  byte_t x;

  assign x = data_in ^ key_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) b[i] <= 8'h00;
    end else if (en && load && row != 2'd3) begin
      b[row] <= x;
    end
  end

  assign wr_en = en && (row == 2'd3);

  always_comb begin
    if (load) begin
      wr_col[0] = b[0];
      wr_col[1] = b[1];
      wr_col[2] = b[2];
      wr_col[3] = x;
    end else begin
      for (int r = 0; r < 4; r++) wr_col[r] = mc_col[r] ^ rk_col[r];
    end
  end

endmodule
