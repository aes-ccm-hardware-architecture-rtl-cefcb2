// tb_key_exp: streams keys into the key expansion unit the way the core
// does (S-box results for the last column during the load, four more per
// round) and checks every round key, by byte and by column, against the
// reference key schedule; the FIPS-197 key 2b7e1516.. must give round key 10
// d014f9a8c9ee2589e13f0cc8b6630ca6.
module tb_key_exp;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ld_en = 0, t_we = 0, upd = 0;
  logic [3:0] ld_k = 0, rnd_next = 0, rk_k = 0;
  logic [7:0] ld_byte = 0, t_val = 0, lk_byte, rk_byte;
  logic [1:0] t_idx = 0, lk_step = 0, rk_c = 0;
  logic [7:0] rk_col [4];
  int checks = 0, failures = 0;

  key_exp dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_key(input blk_t exp, input int r);
    @(negedge clk);
    ld_en = 0; t_we = 0; upd = 0;
    for (int i = 0; i < 16; i++) begin
      rk_k = 4'(i);
      rk_c = 2'(i / 4);
      #1;
      checks++;
      if (rk_byte !== get_b(exp, i) || rk_col[i % 4] !== get_b(exp, i)) begin
        failures++;
        $display("FAIL round key %0d byte %0d: %02x/%02x exp %02x", r, i, rk_byte,
                 rk_col[i % 4], get_b(exp, i));
      end
    end
  endtask

  task automatic run_key(input blk_t key);
    // load, with the last-column substitutions in steps 12..15
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      ld_en = 1; ld_k = 4'(k); ld_byte = get_b(key, k);
      t_we = (k >= 12); t_idx = 2'(k - 13); t_val = r_sbox(get_b(key, k));
      upd = (k == 15); rnd_next = 4'd1;
    end
    check_key(round_key(key, 1), 1);
    for (int r = 1; r < 10; r++) begin
      for (int s = 0; s < 4; s++) begin
        @(negedge clk);
        // an idle cycle in between, as after a collision
        if ($urandom % 3 == 0) @(negedge clk);
        lk_step = 2'(s);
        #1;
        checks++;
        if (lk_byte !== get_b(round_key(key, r), 12 + (s + 1) % 4)) begin
          failures++;
          $display("FAIL lookup byte round %0d step %0d", r, s);
        end
        t_we = 1; t_idx = 2'(s); t_val = r_sbox(lk_byte);
        @(negedge clk);
        t_we = 0;
      end
      @(negedge clk);
      upd = 1; rnd_next = 4'(r + 1);
      check_key(round_key(key, r + 1), r + 1);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks++;
    if (round_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 10) !==
        128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++;
      $display("FAIL reference key schedule");
    end
    for (int t = 0; t < 5; t++) run_key({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
