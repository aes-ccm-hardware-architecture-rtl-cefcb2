// shared_sbox: one S-box shared by the data path and the key expansion.
//
// Four sub-LUTs (sbox_slut) each hold a quarter of the S-box. The two top
// bits of each input byte pick the sub-LUT it needs (the 2-bit selectors
// key_t[7:6] and data_t[7:6] of the published S-box datapath). When the data byte
// and the key byte need different sub-LUTs both are substituted in the same
// cycle; when they need the same one they collide and only one of them can be
// served. This design then serves the key byte first (k_gnt=1, d_gnt=0) and
// leaves the data byte to the requester's next cycle, so a collision costs
// exactly one cycle; the published architecture says only that a collision takes two
// cycles, the priority is this design's choice.
//
// Purely combinational: requests and addresses in, grants and substituted
// bytes out in the same cycle. A sub-LUT not addressed by a granted request
// keeps an all-zero address, so idle sub-LUTs do not switch.
module shared_sbox
  import aes_pkg::*;
(
  input  logic  d_req,      // data path wants a substitution
  input  byte_t d_in,       // data byte (data_t)
  input  logic  k_req,      // key expansion wants a substitution
  input  byte_t k_in,       // key byte (key_t)
  output logic  d_gnt,      // d_out is valid this cycle
  output byte_t d_out,
  output logic  k_gnt,      // k_out is valid this cycle
  output byte_t k_out,
  output logic  collision   // both requested the same sub-LUT
);

  logic [1:0] d_sel, k_sel;
  logic [5:0] lut_addr [4];
  byte_t      lut_dout [4];

  assign d_sel     = d_in[7:6];
  assign k_sel     = k_in[7:6];
  assign collision = d_req && k_req && (d_sel == k_sel);
  assign k_gnt     = k_req;  // the key side always wins a collision
  assign d_gnt     = d_req && !collision;

  // Address routing: each sub-LUT takes the key byte when it is the key's
  // sub-LUT and the key is granted, otherwise the data byte when it is the
  // data's sub-LUT and the data is granted.
  always_comb begin
    for (int q = 0; q < 4; q++) begin
      lut_addr[q] = 6'd0;
      if (k_gnt && k_sel == 2'(q))      lut_addr[q] = k_in[5:0];
      else if (d_gnt && d_sel == 2'(q)) lut_addr[q] = d_in[5:0];
    end
  end

  for (genvar q = 0; q < 4; q++) begin : g_slut
    sbox_slut #(.QUARTER(q)) u_slut (.addr(lut_addr[q]), .dout(lut_dout[q]));
  end

  assign d_out = lut_dout[d_sel];
  assign k_out = lut_dout[k_sel];

endmodule
