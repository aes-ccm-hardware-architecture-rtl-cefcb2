// byte_perm: byte permutation unit of the 8-bit AES core.
//
// Holds the 16-byte AES state and performs ShiftRows by the order in which
// it hands bytes out: read step k (0..15) returns the byte that ShiftRows
// moves to column k/4, row k%4, i.e. state[sr_index(k)]. The new state of a
// round comes back one whole column at a time (write column 0..3). Because
// ShiftRows still needs bytes of every old column until the round's last
// step, columns 0..2 of the new state wait in a 12-byte shadow bank; writing
// column 3 copies the shadow bank and column 3 into the state in one clock
// edge, so the next round can start reading on the following cycle.
// The published architecture names this unit and its place in the core; the storage
// organisation (state bank plus shadow bank) is this design's own.
//
// Timing: the read port is combinational; writes take effect at the clock
// edge. The state is cleared by reset.
module byte_perm
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] rd_k,     // read step 0..15
  output byte_t      rd_byte,  // state[sr_index(rd_k)]
  input  logic       wr_en,    // write one column of the next state
  input  logic [1:0] wr_col,   // column number; column 3 completes the state
  input  col_t       wr_data
);

  byte_t st  [16];
  byte_t shd [12];

  assign rd_byte = st[sr_index(rd_k)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) st[i] <= 8'h00;
      for (int i = 0; i < 12; i++) shd[i] <= 8'h00;
    end else if (wr_en) begin
      if (wr_col != 2'd3) begin
        for (int r = 0; r < 4; r++) shd[4*wr_col + r] <= wr_data[r];
      end else begin
        for (int i = 0; i < 12; i++) st[i] <= shd[i];
        for (int r = 0; r < 4; r++) st[12 + r] <= wr_data[r];
      end
    end
  end

endmodule
