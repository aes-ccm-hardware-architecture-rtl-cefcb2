// tb_byte_perm: writes random states column by column and reads them back
// in ShiftRows order; also checks that columns 0..2 stay invisible until
// column 3 is written (the old state must remain readable during a round).
module tb_byte_perm;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] rd_k;
  logic [7:0] rd_byte;
  logic wr_en = 0;
  logic [1:0] wr_col = 0;
  logic [7:0] wr_data [4];
  int checks = 0, failures = 0;

  byte_perm dut (.*);

  always #50 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t old_s, new_s;
    old_s = '0;
    for (int r = 0; r < 4; r++) wr_data[r] = 0;
    rd_k = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 20; t++) begin
      new_s = {$urandom, $urandom, $urandom, $urandom};
      for (int c = 0; c < 4; c++) begin
        @(negedge clk);
        wr_en = 1;
        wr_col = 2'(c);
        for (int r = 0; r < 4; r++) wr_data[r] = get_b(new_s, 4*c + r);
        // while the new state is being written the old one is still read
        for (int k = 0; k < 16; k++) begin
          rd_k = 4'(k);
          #1;
          checks++;
          if (rd_byte !== get_b(old_s, 4*(((k/4) + (k%4)) % 4) + k%4)) begin
            failures++;
            $display("FAIL old state t=%0d c=%0d k=%0d", t, c, k);
          end
        end
      end
      @(negedge clk);
      wr_en = 0;
      for (int k = 0; k < 16; k++) begin
        rd_k = 4'(k);
        #1;
        checks++;
        if (rd_byte !== get_b(new_s, 4*(((k/4) + (k%4)) % 4) + k%4)) begin
          failures++;
          $display("FAIL new state t=%0d k=%0d got %02x", t, k, rd_byte);
        end
      end
      old_s = new_s;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
