// tb_collision_stats: collision statistics of the shared S-box over a long
// back-to-back stream of random blocks through the AES core.
// Each block offers 40 steps in which a data byte and a key byte meet at the
// S-box (4 in each of rounds 1..9 and 4 while the next block loads). With
// random bytes each step collides with probability 1/4, so a block should
// average 10 collisions (standard deviation 2.7) and take 160..200 cycles.
// The testbench checks every block's period against the reference model's
// prediction (measured between first ciphertext bytes), the range, and that the mean over 400 blocks lies within
// 10 +/- 0.8 (about five standard errors). It prints the mean cycles per
// block and the resulting throughput at a 174 MHz clock.
module tb_collision_stats;
  import aes_ref_pkg::*;

  localparam int NBLK = 400;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, done, busy, collision;
  logic [7:0] data_in = 0, key_in = 0, data_out;
  int checks = 0, failures = 0;
  longint cyc = 0;

  aes_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NBLK * 220 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  blk_t keys [NBLK], pts [NBLK];
  longint t_first [NBLK];
  int nb_out = 0, ncoll = 0, ob = 0;
  blk_t cur = '0;

  always @(posedge clk) begin
    if (rst_n && collision) ncoll++;
    if (rst_n && out_valid) begin
      if (ob == 0) t_first[nb_out] = cyc;
      cur = set_b(cur, ob, data_out);
      ob++;
      if (ob == 16) begin
        ob = 0;
        checks++;
        if (cur !== aes_enc(keys[nb_out], pts[nb_out])) begin
          failures++;
          $display("FAIL block %0d ciphertext", nb_out);
        end
        nb_out++;
      end
    end
  end

  initial begin
    int bi, k, exp_total, minp, maxp, hist [41];
    real mean;
    for (int i = 0; i < NBLK; i++) begin
      keys[i] = {$urandom, $urandom, $urandom, $urandom};
      pts[i]  = {$urandom, $urandom, $urandom, $urandom};
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // continuous input stream, every block offered as soon as possible
    bi = 0;
    k = 0;
    while (bi < NBLK) begin
      @(negedge clk);
      in_valid = 1;
      data_in = get_b(pts[bi], k);
      key_in = get_b(keys[bi], k);
      @(posedge clk);
      if (in_ready) begin
        k++;
        if (k == 16) begin
          k = 0;
          bi++;
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    wait (nb_out == NBLK);
    @(posedge clk);

    exp_total = 0;
    minp = 1000;
    maxp = 0;
    foreach (hist[i]) hist[i] = 0;
    for (int i = 1; i < NBLK; i++) begin
      int c, p;
      c = collisions(keys[i], pts[i]) + collisions_overlap(keys[i-1], pts[i-1], keys[i]);
      exp_total += c;
      hist[c]++;
      p = int'(t_first[i] - t_first[i-1]);
      if (p < minp) minp = p;
      if (p > maxp) maxp = p;
      checks++;
      if (p != 160 + c || p < 160 || p > 200) begin
        failures++;
        $display("FAIL block %0d period %0d, predicted %0d", i, p, 160 + c);
      end
    end
    exp_total += collisions(keys[0], pts[0]);
    checks++;
    if (ncoll != exp_total) begin
      failures++;
      $display("FAIL collision count %0d, predicted %0d", ncoll, exp_total);
    end
    mean = real'(ncoll - collisions(keys[0], pts[0])) / real'(NBLK - 1);
    checks++;
    if (mean < 9.2 || mean > 10.8) begin
      failures++;
      $display("FAIL mean collisions per block %f, expected about 10", mean);
    end
    $display("blocks %0d: collisions per block mean %.2f; period min %0d max %0d mean %.1f cycles",
             NBLK, mean, minp, maxp, 160.0 + mean);
    $display("throughput at 174 MHz: %.1f Mbps (no collisions: %.1f, 40 collisions: %.1f)",
             128.0 * 174.0 / (160.0 + mean), 128.0 * 174.0 / 160.0, 128.0 * 174.0 / 200.0);
    $write("histogram of collisions per block:");
    foreach (hist[i]) if (hist[i] != 0) $write(" %0d:%0d", i, hist[i]);
    $display("");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
