// tb_sbox_slut: checks the four S-box sub-LUTs entry by entry against the
// reference S-box (inverse computed as a^254), plus two FIPS-197 entries.
module tb_sbox_slut;
  import aes_ref_pkg::*;

  logic [5:0] addr;
  logic [7:0] dout [4];
  int checks = 0, failures = 0;

  for (genvar q = 0; q < 4; q++) begin : g_q
    sbox_slut #(.QUARTER(q)) dut (.addr(addr), .dout(dout[q]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      addr = 6'(a);
      #1;
      for (int q = 0; q < 4; q++) begin
        checks++;
        if (dout[q] !== r_sbox(8'(q*64 + a))) begin
          failures++;
          $display("FAIL S(%02x) = %02x, expected %02x", q*64 + a, dout[q], r_sbox(8'(q*64 + a)));
        end
      end
    end
    addr = 6'h00; #1; checks++; if (dout[0] !== 8'h63) failures++;
    addr = 6'h13; #1; checks++; if (dout[1] !== 8'hed) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
