// tb_aes_core: end-to-end test of the 8-bit AES-128 core.
//  1. FIPS-197 known answers (appendix B and C.1), one block at a time:
//     ciphertext and latency (first output exactly 160 + collisions cycles
//     after the first byte is taken).
//  2. A back-to-back stream of random blocks: each block must leave
//     160 + collisions cycles after the previous one, with the collisions
//     predicted by the reference model (at most 40 per block), and the
//     core's collision count must match the prediction.
//  3. Random blocks with random gaps in the input stream.
module tb_aes_core;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, done, busy, collision;
  logic [7:0] data_in = 0, key_in = 0, data_out;
  int checks = 0, failures = 0;
  longint cyc = 0;

  aes_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input side
  blk_t in_pt [$], in_key [$];
  int   gap_pct = 0;
  longint first_take [$];

  initial begin : driver
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (in_pt.size() != 0) begin : drive
        int k;
        k = 0;
        while (k < 16) begin
          in_valid = ($urandom % 100) >= gap_pct;
          data_in  = get_b(in_pt[0], k);
          key_in   = get_b(in_key[0], k);
          @(posedge clk);
          if (in_valid && in_ready) begin
            if (k == 0) first_take.push_back(cyc);
            k++;
          end
          @(negedge clk);
        end
        in_valid = 0;
        void'(in_pt.pop_front());
        void'(in_key.pop_front());
      end
    end
  end

  // output side
  blk_t   out_ct [$];
  longint first_out [$];
  int     ncoll = 0;
  blk_t   cur = '0;
  int     ob = 0;

  always @(posedge clk) begin
    if (rst_n && collision) ncoll++;
    if (rst_n && out_valid) begin
      if (ob == 0) first_out.push_back(cyc);
      cur = set_b(cur, ob, data_out);
      ob++;
      if (ob == 16) begin
        checks++;
        if (!done) begin
          failures++;
          $display("FAIL done missing");
        end
        out_ct.push_back(cur);
        ob = 0;
      end
    end
  end

  task automatic expect_blk(input blk_t key, input blk_t pt, input blk_t exp);
    blk_t got;
    checks++;
    got = out_ct.pop_front();
    if (got !== exp || aes_enc(key, pt) !== exp) begin
      failures++;
      $display("FAIL ct %032x exp %032x (model %032x)", got, exp, aes_enc(key, pt));
    end
  endtask

  initial begin
    blk_t keys [$], pts [$];
    int exp_coll, ovl;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // 1. known answers, one at a time
    keys = '{128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h000102030405060708090a0b0c0d0e0f};
    pts  = '{128'h3243f6a8885a308d313198a2e0370734, 128'h00112233445566778899aabbccddeeff};
    for (int i = 0; i < 2; i++) begin
      in_pt.push_back(pts[i]);
      in_key.push_back(keys[i]);
      wait (out_ct.size() == 1);
      @(posedge clk);
      expect_blk(keys[i], pts[i], i == 0 ? 128'h3925841d02dc09fbdc118597196a0b32
                                          : 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
      checks++;
      exp_coll = collisions(keys[i], pts[i]);
      if (first_out[0] - first_take[0] != longint'(160 + exp_coll)) begin
        failures++;
        $display("FAIL latency %0d exp %0d", first_out[0] - first_take[0], 160 + exp_coll);
      end
      void'(first_out.pop_front());
      void'(first_take.pop_front());
    end

    // 2. back-to-back stream
    keys.delete(); pts.delete();
    for (int i = 0; i < 24; i++) begin
      keys.push_back({$urandom, $urandom, $urandom, $urandom});
      pts.push_back({$urandom, $urandom, $urandom, $urandom});
      // a few blocks share the previous key, as in CCM
      if (i > 0 && i % 3 == 0) keys[i] = keys[i-1];
    end
    repeat (5) @(posedge clk);
    ncoll = 0;
    foreach (pts[i]) begin
      in_pt.push_back(pts[i]);
      in_key.push_back(keys[i]);
    end
    wait (out_ct.size() == pts.size());
    @(posedge clk);
    exp_coll = 0;
    foreach (pts[i]) begin
      expect_blk(keys[i], pts[i], aes_enc(keys[i], pts[i]));
      exp_coll += collisions(keys[i], pts[i]);
      if (i > 0) begin
        ovl = collisions_overlap(keys[i-1], pts[i-1], keys[i]);
        exp_coll += ovl;
        checks++;
        if (first_out[i] - first_out[i-1] !=
            longint'(160 + collisions(keys[i], pts[i]) + ovl)) begin
          failures++;
          $display("FAIL block period %0d", first_out[i] - first_out[i-1]);
        end
        checks++;
        if (first_out[i] - first_out[i-1] < 160 || first_out[i] - first_out[i-1] > 200)
          failures++;
      end
    end
    checks++;
    if (ncoll != exp_coll || ncoll == 0) begin
      failures++;
      $display("FAIL collisions %0d exp %0d", ncoll, exp_coll);
    end
    $display("stream: %0d blocks, %0d collisions, %0d cycles",
             pts.size(), ncoll, first_out[pts.size()-1] - first_out[0]);
    first_out.delete();
    first_take.delete();

    // 3. gaps in the input stream
    gap_pct = 30;
    keys.delete(); pts.delete();
    for (int i = 0; i < 12; i++) begin
      keys.push_back({$urandom, $urandom, $urandom, $urandom});
      pts.push_back({$urandom, $urandom, $urandom, $urandom});
      in_pt.push_back(pts[i]);
      in_key.push_back(keys[i]);
    end
    wait (out_ct.size() == pts.size());
    @(posedge clk);
    foreach (pts[i]) expect_blk(keys[i], pts[i], aes_enc(keys[i], pts[i]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
