// tb_ps_conv: checks the parallel-serial converter in both modes: serial
// plaintext/key bytes assembled into columns with the initial AddRoundKey,
// and parallel MixColumns columns XORed with the round-key column.
module tb_ps_conv;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [1:0] row = 0;
  logic [7:0] data_in = 0, key_in = 0;
  logic [7:0] mc_col [4], rk_col [4], wr_col [4];
  logic wr_en;
  int checks = 0, failures = 0, writes = 0;

  ps_conv dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d [4], kk [4];
    for (int r = 0; r < 4; r++) begin mc_col[r] = 0; rk_col[r] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 400; t++) begin
      load = t[0];
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        en = ($urandom % 4) != 0;
        while (!en) begin
          row = 2'($urandom);
          @(negedge clk);
          en = ($urandom % 4) != 0;
        end
        row = 2'(r);
        d[r] = 8'($urandom);
        kk[r] = 8'($urandom);
        data_in = d[r];
        key_in = kk[r];
        for (int i = 0; i < 4; i++) begin
          mc_col[i] = 8'($urandom);
          rk_col[i] = 8'($urandom);
        end
        #1;
        checks++;
        if (wr_en !== (r == 3)) begin
          failures++;
          $display("FAIL wr_en at row %0d", r);
        end
        if (r == 3) begin
          writes++;
          for (int i = 0; i < 4; i++) begin
            logic [7:0] e;
            e = load ? (d[i] ^ kk[i]) : (mc_col[i] ^ rk_col[i]);
            checks++;
            if (wr_col[i] !== e) begin
              failures++;
              $display("FAIL load=%0b row %0d got %02x exp %02x", load, i, wr_col[i], e);
            end
          end
        end
      end
      @(negedge clk);
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
