// aes_ccm: AES-CCM security engine (IEEE 802.15.4 AES-CCM-64 style) around
// the 8-bit shared-S-box AES core.
//
// CCM combines CBC-MAC authentication with counter-mode encryption, both
// using only the forward AES cipher, so one encryption core serves both
// directions. With L = 2 length bytes the nonce is 13 bytes and the MIC is
// MIC_LEN bytes (8 for AES-CCM-64). The engine issues the AES runs whose
// count the published architecture budgets, in this order:
//   B0     {flags, nonce, l(m)}                          -> X
//   H1..   X ^ {l(a), header, zero pad}, 16 bytes a run   -> X
//   CTR i  A(i) = {0x01, nonce, i}; payload block i ^ E(A(i)) is output
//   MAC i  X ^ {plaintext block i, zero pad}               -> X
//   S0     A(0); MIC = X ^ E(A(0)), truncated to MIC_LEN
// For each payload block the CTR run comes first, so that while the core
// unloads E(A(i)) it can already load the MAC run of the same block: when
// decrypting, the recovered plaintext byte goes straight into the MAC input.
//
// Runs are overlapped as the core allows: a run is loaded during the final
// round of the previous one whenever its input block is complete by then.
// A MAC run that follows a MAC run takes the previous result byte by byte
// as it leaves the core (chaining without waiting). The input block
// register is refilled from the byte stream while the core computes rounds,
// so with a fast enough source every AES run takes 160 + collisions cycles.
// Three 128-bit registers hold the input block (inreg), the CBC-MAC value
// (xreg) and the last AES result (res). The published architecture gives
// the CCM block counts, 160..200 cycles per block and the 128-bit input,
// output and intermediate registers; the run order, the overlap and the
// stream interface are this design's choices (CCM itself follows the
// standard).
//
// Interface: pulse start with key, nonce, a_len (header bytes), m_len
// (payload bytes) and decrypt valid; then stream in_byte (valid/ready):
// a_len header bytes, m_len payload bytes and, when decrypting, the MIC_LEN
// received MIC bytes. out_byte/out_valid (no back-pressure) carry the m_len
// processed payload bytes and, when encrypting, the MIC_LEN MIC bytes. done
// pulses at the end, with mic_ok (decryption: the received MIC matched;
// encryption: 1). aes_collision and aes_block report S-box collisions and
// finished AES runs. Byte 0 of key and nonce is in their top bits.
module aes_ccm
  import aes_pkg::*;
#(
  parameter int unsigned MIC_LEN = 8   // bytes of MIC (4, 8 or 16)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         decrypt,
  input  logic [127:0] key,
  input  logic [103:0] nonce,
  input  logic [7:0]   a_len,
  input  logic [7:0]   m_len,
  input  logic         in_valid,
  output logic         in_ready,
  input  byte_t        in_byte,
  output logic         out_valid,
  output byte_t        out_byte,
  output logic         done,
  output logic         mic_ok,
  output logic         busy,
  output logic         aes_collision,  // S-box collision in the AES core
  output logic         aes_block       // the AES core finished a block
);

  typedef enum logic [2:0] {J_B0, J_HDR, J_CTR, J_MAC, J_S0, J_NONE} job_t;

  localparam byte_t FLAGS_B0 = byte_t'(((MIC_LEN - 2) / 2) << 3) | 8'h01;

  logic   busy_q, dec_q;
  byte_t  kb [16], nb [13];
  byte_t  inreg [16], xreg [16], res [16];

  // input block collection
  logic       full;          // inreg holds a complete block
  logic [4:0] pos;           // next byte position in inreg
  logic [4:0] nblk;          // payload bytes in the block held
  logic [7:0] hrem, prem;    // header / payload bytes still to collect
  logic [4:0] mrem;          // received MIC bytes still to collect
  logic       hfirst;        // next header block carries the length prefix

  // feed side: the run being loaded into the core
  job_t       fjob;
  logic [4:0] icnt;
  logic [4:0] hblk;          // header runs still to issue
  logic [4:0] pblk;          // payload blocks still to issue
  logic [7:0] ctr;           // counter of the next CTR run
  job_t       prev;          // run issued before fjob (in the core)

  // output side: runs whose results are still to come, oldest first
  job_t       oq [2];
  logic [1:0] oq_n;
  logic [4:0] ocnt;
  logic       mic_bad;

  // AES core
  logic  c_in_valid, c_in_ready, c_out_valid, c_done, c_busy;
  byte_t c_data_in, c_key_in, c_data_out;

  aes_core u_core (
    .clk, .rst_n,
    .in_valid (c_in_valid),
    .in_ready (c_in_ready),
    .data_in  (c_data_in),
    .key_in   (c_key_in),
    .out_valid(c_out_valid),
    .data_out (c_data_out),
    .done     (c_done),
    .busy     (c_busy),
    .collision(aes_collision)
  );

  assign aes_block = c_done;

  // ---------------------------------------------------------------- feed
  logic  f_is_mac, f_ready, f_take, f_last;
  logic [3:0] fi;
  byte_t rb;      // result byte fi of the run in the core, live or stored
  byte_t xb;      // CBC-MAC byte fi the run being fed depends on

  assign fi       = icnt[3:0];
  assign f_is_mac = (fjob == J_B0) || (fjob == J_HDR) || (fjob == J_MAC);
  assign f_ready  = busy_q && (fjob != J_NONE) &&
                    ((fjob == J_S0) ? (!dec_q || full) : full);
  assign c_in_valid = f_ready;
  assign f_take   = c_in_valid && c_in_ready;
  assign f_last   = f_take && (icnt == 5'd15);

  assign rb = c_out_valid ? c_data_out : res[fi];
  assign xb = (prev == J_B0 || prev == J_HDR || prev == J_MAC) ? rb : xreg[fi];

  always_comb begin
    c_data_in = 8'h00;
    unique case (fjob)
      J_CTR, J_S0: begin
        if (fi == 4'd0)       c_data_in = 8'h01;
        else if (fi <= 4'd13) c_data_in = nb[fi - 4'd1];
        else if (fi == 4'd15) c_data_in = (fjob == J_S0) ? 8'h00 : ctr;
      end
      J_MAC: begin
        // decrypting: plaintext = ciphertext ^ E(A(i)) of the CTR run before
        if (dec_q) c_data_in = xb ^ ((5'(fi) < nblk) ? (inreg[fi] ^ rb) : 8'h00);
        else       c_data_in = xb ^ inreg[fi];
      end
      default:     c_data_in = xb ^ inreg[fi];   // B0 (X = 0), header
    endcase
  end
  assign c_key_in = kb[fi];

  // ---------------------------------------------------------------- output
  job_t  ojob;
  logic  o_mac;
  assign ojob  = (oq_n != 2'd0) ? oq[0] : J_NONE;
  assign o_mac = (ojob == J_B0) || (ojob == J_HDR) || (ojob == J_MAC);

  always_comb begin
    out_valid = 1'b0;
    out_byte  = 8'h00;
    if (c_out_valid && ojob == J_CTR && ocnt < nblk) begin
      out_valid = 1'b1;
      out_byte  = c_data_out ^ inreg[ocnt[3:0]];
    end else if (c_out_valid && ojob == J_S0 && !dec_q && ocnt < 5'(MIC_LEN)) begin
      out_valid = 1'b1;
      out_byte  = c_data_out ^ xreg[ocnt[3:0]];
    end
  end

  // ---------------------------------------------------------------- collect
  logic c_take, c_block_end;
  assign in_ready    = busy_q && !full && ((hrem != 0) || (prem != 0) || (mrem != 0));
  assign c_take      = in_ready && in_valid;
  assign c_block_end = (pos == 5'd15) ||
                       ((hrem != 0) ? (hrem == 8'd1) :
                        (prem != 0) ? (prem == 8'd1) : (mrem == 5'd1));

  assign busy = busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      dec_q   <= 1'b0;
      full    <= 1'b0;
      pos     <= '0;
      nblk    <= '0;
      hrem    <= '0;
      prem    <= '0;
      mrem    <= '0;
      hfirst  <= 1'b0;
      fjob    <= J_NONE;
      prev    <= J_NONE;
      icnt    <= '0;
      hblk    <= '0;
      pblk    <= '0;
      ctr     <= '0;
      oq[0]   <= J_NONE;
      oq[1]   <= J_NONE;
      oq_n    <= '0;
      ocnt    <= '0;
      mic_bad <= 1'b0;
      done    <= 1'b0;
      mic_ok  <= 1'b0;
      for (int i = 0; i < 16; i++) begin
        kb[i] <= 8'h00; inreg[i] <= 8'h00; xreg[i] <= 8'h00; res[i] <= 8'h00;
      end
      for (int i = 0; i < 13; i++) nb[i] <= 8'h00;
    end else begin
      done <= 1'b0;

      if (!busy_q) begin
        if (start) begin
          busy_q  <= 1'b1;
          dec_q   <= decrypt;
          hrem    <= a_len;
          prem    <= m_len;
          mrem    <= decrypt ? 5'(MIC_LEN) : 5'd0;
          hfirst  <= 1'b1;
          hblk    <= (a_len == 0) ? 5'd0 : 5'((9'(a_len) + 9'd17) >> 4);
          pblk    <= 5'((9'(m_len) + 9'd15) >> 4);
          ctr     <= 8'd1;
          fjob    <= J_B0;
          prev    <= J_NONE;
          icnt    <= '0;
          ocnt    <= '0;
          oq_n    <= '0;
          mic_bad <= 1'b0;
          full    <= 1'b1;   // B0 is the first input block
          for (int i = 0; i < 16; i++) begin
            kb[i]   <= key[127 - 8*i -: 8];
            xreg[i] <= 8'h00;
          end
          for (int i = 0; i < 13; i++) begin
            nb[i]        <= nonce[103 - 8*i -: 8];
            inreg[1 + i] <= nonce[103 - 8*i -: 8];
          end
          inreg[0]  <= FLAGS_B0 | ((a_len != 0) ? 8'h40 : 8'h00);
          inreg[14] <= 8'h00;
          inreg[15] <= m_len;
        end
      end else begin
        // ---- collect input bytes into a free inreg
        if (c_take) begin
          inreg[pos[3:0]] <= in_byte;
          pos <= pos + 5'd1;
          if (hrem != 0)      hrem <= hrem - 8'd1;
          else if (prem != 0) prem <= prem - 8'd1;
          else                mrem <= mrem - 5'd1;
          if (c_block_end) begin
            full <= 1'b1;
            if (hrem == 0 && prem != 0) nblk <= pos + 5'd1;
          end
        end

        // ---- feed the core
        if (f_take) begin
          icnt <= icnt + 5'd1;
          if (f_last) begin
            icnt <= '0;
            prev <= fjob;
            // a MAC run has consumed the input block: free it
            if (f_is_mac) begin
              full <= 1'b0;
              pos  <= 5'd0;
              for (int i = 0; i < 16; i++) inreg[i] <= 8'h00;
              if (hfirst && hrem != 0) begin
                inreg[1] <= hrem;   // 16-bit header length prefix
                pos      <= 5'd2;
                hfirst   <= 1'b0;
              end
            end
            unique case (fjob)
              J_B0, J_HDR: begin
                if (fjob == J_HDR) hblk <= hblk - 5'd1;
                if ((fjob == J_B0 ? hblk : hblk - 5'd1) != 5'd0) fjob <= J_HDR;
                else if (pblk != 5'd0)                          fjob <= J_CTR;
                else                                            fjob <= J_S0;
              end
              J_CTR: begin
                fjob <= J_MAC;
                ctr  <= ctr + 8'd1;
                pblk <= pblk - 5'd1;
              end
              J_MAC: fjob <= (pblk != 5'd0) ? J_CTR : J_S0;
              default: fjob <= J_NONE;   // J_S0
            endcase
          end
        end

        // ---- results leaving the core
        if (c_out_valid) begin
          res[ocnt[3:0]] <= c_data_out;
          if (o_mac) xreg[ocnt[3:0]] <= c_data_out;
          if (ojob == J_S0 && dec_q && ocnt < 5'(MIC_LEN) &&
              (c_data_out ^ xreg[ocnt[3:0]]) != inreg[ocnt[3:0]])
            mic_bad <= 1'b1;
          ocnt <= ocnt + 5'd1;
          if (c_done) begin
            ocnt <= '0;
            if (ojob == J_S0) begin
              busy_q <= 1'b0;
              done   <= 1'b1;
              mic_ok <= !dec_q ||
                        (!mic_bad && (MIC_LEN < 16 ||
                                      (c_data_out ^ xreg[15]) == inreg[15]));
              fjob   <= J_NONE;
            end
          end
        end

        // ---- output queue: a run is pushed when fully loaded, popped
        // when its last result byte leaves the core
        if (f_last && !c_done) begin
          oq_n <= oq_n + 2'd1;
          if (oq_n == 2'd0) oq[0] <= fjob;
          else              oq[1] <= fjob;
        end else if (c_done && !f_last) begin
          oq_n  <= oq_n - 2'd1;
          oq[0] <= oq[1];
        end else if (c_done && f_last) begin
          if (oq_n == 2'd1) oq[0] <= fjob;
          else begin
            oq[0] <= oq[1];
            oq[1] <= fjob;
          end
        end
      end
    end
  end

  // A frame starts on an idle core.
  a_b0_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (fjob == J_B0 && f_take && icnt == 5'd0) |-> !c_busy);
  // At most two runs are in the core: one finishing, one loading.
  a_oq: assert property (@(posedge clk) disable iff (!rst_n) oq_n <= 2'd2);
  a_mic_len: assert property (@(posedge clk) MIC_LEN inside {4, 8, 16});

endmodule
