// mixcol: MixColumns multiplier of the 8-bit AES core.
//
// Takes the substituted bytes of one state column serially, row 0 first
// (one byte per enabled cycle), keeps rows 0..2 in three byte registers and,
// in the cycle row 3 arrives, outputs the whole MixColumns result of the
// column in parallel:
//   b0 = 2a0 ^ 3a1 ^  a2 ^  a3      b1 =  a0 ^ 2a1 ^ 3a2 ^  a3
//   b2 =  a0 ^  a1 ^ 2a2 ^ 3a3      b3 = 3a0 ^  a1 ^  a2 ^ 2a3
// (products in GF(2^8)). The published architecture names the unit and shows it feeding
// four bytes in parallel to the parallel-serial converter; the serial-in,
// parallel-out organisation is this design's reading of that.
//
// Timing: dout is combinational and valid only while row == 3.
module mixcol
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,     // din is a new byte of the column
  input  logic [1:0] row,    // its row
  input  byte_t      din,
  output col_t       dout    // mixed column, valid with row == 3
);

  byte_t a [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) a[i] <= 8'h00;
    end else if (en && row != 2'd3) begin
      a[row] <= din;
    end
  end

  byte_t s0, s1, s2, s3;
  assign s0 = a[0];
  assign s1 = a[1];
  assign s2 = a[2];
  assign s3 = din;

  assign dout[0] = xtime(s0) ^ xtime(s1) ^ s1 ^ s2 ^ s3;
  assign dout[1] = s0 ^ xtime(s1) ^ xtime(s2) ^ s2 ^ s3;
  assign dout[2] = s0 ^ s1 ^ xtime(s2) ^ xtime(s3) ^ s3;
  assign dout[3] = xtime(s0) ^ s0 ^ s1 ^ s2 ^ xtime(s3);

endmodule
