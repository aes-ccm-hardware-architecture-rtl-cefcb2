// tb_aes_ccm: end-to-end test of the AES-CCM engine with its 8-bit AES core,
// at the default parameters (8-byte MIC).
//  * RFC 3610 packet vector #1 (M = 8, L = 2): ciphertext and MIC.
//  * The two frame sizes of the 802.15.4 timing budget, an 18-octet short
//    frame and a 127-octet long frame, encrypted and decrypted; the AES
//    block count and the cycle count are checked and printed.
//  * Random frames (header and payload from 0 to 40 bytes) against the
//    reference CCM model, each decrypted again; every other decryption gets
//    a corrupted MIC, which must be rejected.
//  * Random frames from a slow source, so that runs cannot overlap.
// Each mechanism (encryption, decryption, MIC rejection, S-box collision,
// header-less and payload-less frames, multi-block header, partial block,
// runs waiting for input)
// is counted and must occur at least once.
module tb_aes_ccm;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start = 0, decrypt = 0;
  logic [127:0] key = 0;
  logic [103:0] nonce = 0;
  logic [7:0] a_len = 0, m_len = 0, in_byte = 0, out_byte;
  logic in_valid = 0, in_ready, out_valid, done, mic_ok, busy, aes_collision, aes_block;
  int checks = 0, failures = 0;

  aes_ccm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_aes = 0, n_coll = 0;
  always @(posedge clk) begin
    if (aes_block) n_aes++;
    if (aes_collision) n_coll++;
  end

  bq_t outq;
  int  gap_pct = 12;   // chance of an idle input cycle, in percent
  bq_t empty;
  always @(posedge clk) if (out_valid) outq.push_back(out_byte);

  int m_enc = 0, m_dec = 0, m_reject = 0, m_coll = 0, m_nohdr = 0, m_nopay = 0,
      m_hdr2 = 0, m_partial = 0, m_stall = 0;

  // Runs one frame; returns the output bytes, mic_ok, cycles and AES runs.
  task automatic frame(input blk_t k, input logic [103:0] n, input bq_t a,
                       input bq_t m, input bq_t mic_in, input logic dec,
                       output bq_t o, output logic ok, output int cycles,
                       output int runs);
    bq_t s;
    int c0, r0;
    s = a;
    foreach (m[i]) s.push_back(m[i]);
    if (dec) foreach (mic_in[i]) s.push_back(mic_in[i]);
    outq = {};
    @(negedge clk);
    key = k; nonce = n; a_len = 8'(a.size()); m_len = 8'(m.size()); decrypt = dec;
    start = 1;
    r0 = n_aes;
    c0 = 0;
    @(negedge clk);
    start = 0;
    while (!done) begin
      in_valid = (s.size() != 0) && ($urandom % 100 >= gap_pct);
      in_byte = (s.size() != 0) ? s[0] : 8'h00;
      @(posedge clk);
      c0++;
      if (in_valid && in_ready) void'(s.pop_front());
      @(negedge clk);
    end
    in_valid = 0;
    ok = mic_ok;
    o = outq;
    cycles = c0;
    runs = n_aes - r0;
    checks++;
    if (s.size() != 0) begin
      failures++;
      $display("FAIL %0d input bytes not taken", s.size());
    end
  endtask

  function automatic int exp_runs(input int al, input int ml);
    return 1 + (al > 0 ? (al + 2 + 15) / 16 : 0) + 2 * ((ml + 15) / 16) + 1;
  endfunction

  task automatic roundtrip(input blk_t k, input logic [103:0] n, input bq_t a,
                           input bq_t m, input logic corrupt, input string name);
    bq_t c, u, o, cu, mic;
    logic ok;
    int cyc, runs, coll0;
    ccm_ref(k, n, a, m, 8, c, u);
    coll0 = n_coll;
    // encrypt
    frame(k, n, a, m, empty, 1'b0, o, ok, cyc, runs);
    cu = c;
    foreach (u[i]) cu.push_back(u[i]);
    checks++;
    if (o != cu || !ok) begin
      failures++;
      $display("FAIL %s encrypt a=%0d m=%0d", name, a.size(), m.size());
    end
    checks++;
    if (runs != exp_runs(a.size(), m.size())) begin
      failures++;
      $display("FAIL %s AES runs %0d exp %0d", name, runs, exp_runs(a.size(), m.size()));
    end
    // back-to-back runs: 16 load cycles, then 160 per run plus collisions
    // (a slow source only makes it longer)
    checks++;
    if (cyc - (16 + 160 * runs + (n_coll - coll0)) < 0 ||
        (gap_pct <= 12 && cyc - (16 + 160 * runs + (n_coll - coll0)) > 3)) begin
      failures++;
      $display("FAIL %s cycles %0d for %0d AES runs with %0d collisions", name, cyc, runs,
               n_coll - coll0);
    end
    if (name != "")
      $display("%s: header %0d payload %0d: %0d AES blocks, %0d collisions, %0d cycles",
               name, a.size(), m.size(), runs, n_coll - coll0, cyc);
    m_enc++;
    if (cyc - (16 + 160 * runs + (n_coll - coll0)) > 100) m_stall++;
    if (n_coll > coll0) m_coll++;
    if (a.size() == 0) m_nohdr++;
    if (m.size() == 0) m_nopay++;
    if (a.size() + 2 > 16) m_hdr2++;
    if (m.size() % 16 != 0) m_partial++;
    // decrypt, optionally with a corrupted MIC
    mic = u;
    if (corrupt) mic[$urandom % 8] ^= 8'(1 << ($urandom % 8));
    frame(k, n, a, c, mic, 1'b1, o, ok, cyc, runs);
    checks++;
    if (o != m || ok != !corrupt) begin
      failures++;
      $display("FAIL %s decrypt a=%0d m=%0d ok=%0b corrupt=%0b", name, a.size(), m.size(),
               ok, corrupt);
    end
    m_dec++;
    if (corrupt && !ok) m_reject++;
  endtask

  initial begin
    bq_t a, m, c, u, o;
    logic ok;
    int cyc, runs;
    blk_t k;
    logic [103:0] n;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // RFC 3610 packet vector #1
    k = 128'hc0c1c2c3c4c5c6c7c8c9cacbcccdcecf;
    n = 104'h00000003020100a0a1a2a3a4a5;
    a = {};
    m = {};
    for (int i = 0; i < 8; i++) a.push_back(8'(i));
    for (int i = 8; i < 31; i++) m.push_back(8'(i));
    frame(k, n, a, m, empty, 1'b0, o, ok, cyc, runs);
    c = {8'h58, 8'h8c, 8'h97, 8'h9a, 8'h61, 8'hc6, 8'h63, 8'hd2, 8'hf0, 8'h66, 8'hd0, 8'hc2,
         8'hc0, 8'hf9, 8'h89, 8'h80, 8'h6d, 8'h5f, 8'h6b, 8'h61, 8'hda, 8'hc3, 8'h84,
         8'h17, 8'he8, 8'hd1, 8'h2c, 8'hfd, 8'hf9, 8'h26, 8'he0};
    checks++;
    if (o != c) begin
      failures++;
      $display("FAIL RFC 3610 vector #1");
      foreach (o[i]) $write("%02x", o[i]);
      $display("");
    end

    // short (18-octet) and long (127-octet) 802.15.4 frames
    for (int f = 0; f < 2; f++) begin
      int al, ml;
      al = (f == 0) ? 9 : 25;
      ml = (f == 0) ? 9 : 102;
      a = {};
      m = {};
      for (int i = 0; i < al; i++) a.push_back(8'($urandom));
      for (int i = 0; i < ml; i++) m.push_back(8'($urandom));
      roundtrip({$urandom, $urandom, $urandom, $urandom},
                {$urandom, $urandom, $urandom, 8'($urandom)}, a, m, 1'b0,
                (f == 0) ? "short frame" : "long frame");
    end

    // random frames
    for (int t = 0; t < 16; t++) begin
      int al, ml;
      al = (t < 2) ? 0 : $urandom % 41;
      ml = (t == 2) ? 0 : $urandom % 41;
      a = {};
      m = {};
      for (int i = 0; i < al; i++) a.push_back(8'($urandom));
      for (int i = 0; i < ml; i++) m.push_back(8'($urandom));
      roundtrip({$urandom, $urandom, $urandom, $urandom},
                {$urandom, $urandom, $urandom, 8'($urandom)}, a, m, t[0], "");
    end

    // a slow source: runs can no longer overlap and start from a plain load
    gap_pct = 93;
    for (int t = 0; t < 6; t++) begin
      int al, ml;
      al = $urandom % 40;
      ml = 1 + $urandom % 40;
      a = {};
      m = {};
      for (int i = 0; i < al; i++) a.push_back(8'($urandom));
      for (int i = 0; i < ml; i++) m.push_back(8'($urandom));
      roundtrip({$urandom, $urandom, $urandom, $urandom},
                {$urandom, $urandom, $urandom, 8'($urandom)}, a, m, t[0], "");
    end

    checks++;
    if (m_stall == 0 || m_enc == 0 || m_dec == 0 || m_reject == 0 || m_coll == 0 || m_nohdr == 0 ||
        m_nopay == 0 || m_hdr2 == 0 || m_partial == 0) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    $display("mechanisms: encrypt %0d decrypt %0d mic-reject %0d collisions-in-frame %0d",
             m_enc, m_dec, m_reject, m_coll);
    $display("            no-header %0d no-payload %0d two-block-header %0d partial-block %0d",
             m_nohdr, m_nopay, m_hdr2, m_partial);
    $display("            frames with runs waiting for input %0d", m_stall);
    $display("S-box collisions in total: %0d over %0d AES blocks", n_coll, n_aes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
