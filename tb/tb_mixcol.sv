// tb_mixcol: feeds columns byte by byte into the MixColumns multiplier and
// compares the parallel result with the reference MixColumns, including the
// known column db 13 53 45 -> 8e 4d a1 bc.
module tb_mixcol;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic [1:0] row = 0;
  logic [7:0] din = 0;
  logic [7:0] dout [4];
  int checks = 0, failures = 0;

  mixcol dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_col(input logic [31:0] col);
    blk_t s, m;
    s = {col, 96'h0};
    m = mix(s);
    for (int r = 0; r < 4; r++) begin
      @(negedge clk);
      en = 1;
      row = 2'(r);
      din = col[31 - 8*r -: 8];
      if (r == 3) begin
        #1;
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (dout[i] !== get_b(m, i)) begin
            failures++;
            $display("FAIL col %08x row %0d got %02x exp %02x", col, i, dout[i], get_b(m, i));
          end
        end
      end
    end
    @(negedge clk);
    en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run_col(32'hdb135345);
    checks++;
    if (mix({32'hdb135345, 96'h0}) !== {32'h8e4da1bc, 96'h0} || dout[0] !== 8'h8e) failures++;
    for (int i = 0; i < 500; i++) run_col($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
