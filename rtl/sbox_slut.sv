// sbox_slut: one sub-LUT of the shared S-box.
//
// The 256-entry AES S-box is split into four 64-entry sub-LUTs; sub-LUT
// QUARTER holds the entries whose input byte has bits [7:6] == QUARTER, and
// is addressed by the remaining six bits. The split into four sub-LUTs of
// 64 entries each is the published architecture's; that each quarter is
// selected by the two top input bits follows its S-box datapath drawing. The contents
// are computed at elaboration from the S-box definition (aes_pkg::sbox_calc).
// The sub-LUT is a purely combinational ROM: the output follows the address
// in the same cycle.
module sbox_slut
  import aes_pkg::*;
#(
  parameter int unsigned QUARTER = 0   // which quarter of the S-box (0..3)
) (
  input  logic [5:0] addr,   // input byte bits [5:0]
  output byte_t      dout    // S-box of {QUARTER[1:0], addr}
);

  function automatic logic [64*8-1:0] build_rom();
    logic [64*8-1:0] t;
    for (int i = 0; i < 64; i++)
      t[i*8 +: 8] = sbox_calc(byte_t'(QUARTER * 64 + i));
    return t;
  endfunction

  localparam logic [64*8-1:0] ROM = build_rom();

  assign dout = ROM[addr*8 +: 8];

endmodule
