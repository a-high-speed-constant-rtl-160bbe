// bpgm_mgf: combined unit for the Blinding Polynomial Generation Method (BPGM) and the Mask
// Generation Function (MGF) of NTRUEncrypt SVES, both built on one SHA-256 core.
//
// Both operations hash a seed sData followed by a 32-bit big-endian counter C = 0, 1, 2, ...
// For BPGM, sData = OID (3 bytes) || m (msg_len bytes) || b (DB/8 bytes) || hTrunc (PKLEN/8
// bytes); for MGF, sData is R4 (the 2N-bit string of coefficients mod 4, 128 bits per word).
// A data formatting unit (DFU) builds each 512-bit SHA-256 input block, one byte per cycle,
// reading the sources through the address ports (combinational read, big-endian bytes in each
// word) and adding the counter and the SHA-256 padding. The blocks that hold only sData are
// hashed once: after the last of them the chaining value is backed up, and every later counter
// value restarts from the backup, so each further hash costs only its one or two tail blocks.
// The DFU fills the next block while the core processes the current one (65 cycles per block).
//
// Each hash output is written as eight 32-bit words to a FIFO that feeds bwc_1 (BPGM) or
// bwc_2 (MGF). To make the run time independent of the data, results are released in fixed
// batches: BPGM, after hash k has been converted, releases exactly BPGM_MIN[k]-BPGM_MIN[k-1]
// indices (first the DR indices of +1 coefficients, then the DR of -1 coefficients);
// MGF releases 64 ten-bit chunks (five 128-bit mask words) after hashes 3, 5, 7, ...
// If a batch is not available, `rnd_error` is raised with `done` and the caller must restart
// with new random data b. The counter start value 0 and the block handshake are this design's
// choices; the batch tables follow the document.
//
// Ports: pulse `start` with `mode` (0 BPGM, 1 MGF) and `msg_len`; `idx_valid`/`idx` carry the
// released indices, `mask_valid`/`mask` the released mask words; `done` pulses at the end.
module bpgm_mgf
  import ntru_pkg::*;
#(
  parameter int unsigned N           = N_DEF,
  parameter int unsigned DB          = DB_DEF,
  parameter int unsigned PKLEN       = PKLEN_DEF,
  parameter logic [23:0] OID         = OID_DEF,
  parameter int unsigned BPGM_HASHES = BPGM_HASHES_DEF,
  parameter rel_tab_t    BPGM_MIN    = BPGM_MIN_DEF,
  parameter int unsigned MGF_HASHES  = MGF_HASHES_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         mode,
  input  logic [7:0]   msg_len,
  output logic [5:0]   pdi_addr,
  input  logic [31:0]  m_cm,
  output logic [2:0]   b_addr,
  input  logic [31:0]  b_cb,
  output logic [2:0]   h_addr,
  input  logic [31:0]  htrunc,
  output logic [4:0]   r4_addr,
  input  logic [127:0] r4,
  output logic         idx_valid,
  output logic [10:0]  idx,
  output logic         mask_valid,
  output logic [127:0] mask,
  output logic         rnd_error,
  output logic         done,
  output logic         busy
);
  localparam int unsigned R4BYTES = (2*N + 7) / 8;
  localparam int unsigned NREL    = (MGF_HASHES - 1) / 2;

  // ---------------- message geometry ----------------
  logic        mode_q;
  logic [7:0]  len_q;
  logic [31:0] sbytes, tot, nblk, tfull, nhash;
  always_comb begin
    sbytes = mode_q ? R4BYTES : 3 + int'(len_q) + DB/8 + PKLEN/8;
    tot    = sbytes + 4;
    nblk   = (tot + 9 + 63) / 64;
    tfull  = sbytes / 64;
    nhash  = mode_q ? MGF_HASHES : BPGM_HASHES;
  end

  // ---------------- DFU ----------------
  logic         dfu_on, fbuf_full;
  logic [511:0] fbuf;
  logic [5:0]   dfu_byte;
  logic [4:0]   dfu_blk;
  logic [31:0]  dfu_hash;
  logic [31:0]  pos;
  logic [7:0]   cur;

  assign pos = 64*int'(dfu_blk) + int'(dfu_byte);

  // addresses of the source word holding the current byte
  logic [31:0] kk;
  always_comb begin
    pdi_addr = '0; b_addr = '0; h_addr = '0; r4_addr = '0;
    kk = 0;
    if (mode_q) begin
      r4_addr = 5'(pos / 16);
    end else if (pos >= 3 && pos < 3 + int'(len_q)) begin
      kk = pos - 3;
      pdi_addr = 6'(kk / 4);
    end else if (pos >= 3 + int'(len_q) && pos < 3 + int'(len_q) + DB/8) begin
      kk = pos - 3 - int'(len_q);
      b_addr = 3'(kk / 4);
    end else if (pos >= 3 + int'(len_q) + DB/8) begin
      kk = pos - 3 - int'(len_q) - DB/8;
      h_addr = 3'(kk / 4);
    end
  end

  // the byte itself
  always_comb begin
    int unsigned k;
    cur = 8'h00;
    k = 0;
    if (pos < sbytes) begin
      if (mode_q)                         cur = r4[127 - 8*(pos % 16) -: 8];
      else if (pos < 3)                   cur = OID[23 - 8*pos -: 8];
      else if (pos < 3 + int'(len_q))     cur = m_cm[31 - 8*(kk % 4) -: 8];
      else if (pos < 3 + int'(len_q) + DB/8) cur = b_cb[31 - 8*(kk % 4) -: 8];
      else                                cur = htrunc[31 - 8*(kk % 4) -: 8];
    end else if (pos < tot) begin
      cur = dfu_hash[31 - 8*(pos - sbytes) -: 8];
    end else if (pos == tot) begin
      cur = 8'h80;
    end else if (pos >= 64*nblk - 8) begin
      k = 64*nblk - 1 - pos;           // byte of the 64-bit bit length, 0 = least significant
      cur = (k < 4) ? 8'((8*tot) >> (8*k)) : 8'h00;
    end
  end

  // ---------------- SHA core ----------------
  logic         sha_start, sha_busy, sha_done, sha_backup, sha_last;
  logic [1:0]   sha_sel;
  logic [255:0] sha_digest;
  logic         blk_last, blk_first_of_hash, blk_backup;

  assign blk_last          = (int'(dfu_blk) == nblk - 1);
  assign blk_first_of_hash = (dfu_hash == 0) ? (dfu_blk == 0) : (int'(dfu_blk) == tfull);
  assign blk_backup        = (dfu_hash == 0) && (tfull > 0) && (int'(dfu_blk) == tfull - 1);
  assign sha_start  = fbuf_full && !sha_busy;
  assign sha_backup = blk_backup;
  always_comb begin
    if (!blk_first_of_hash)      sha_sel = 2'd0;
    else if (dfu_hash == 0 || tfull == 0) sha_sel = 2'd1;
    else                         sha_sel = 2'd2;
  end

  modified_sha2 u_sha (
    .clk, .rst_n, .start(sha_start), .sel_init(sha_sel), .en_backup(sha_backup),
    .block(fbuf), .busy(sha_busy), .done(sha_done), .digest(sha_digest));

  // ---------------- digest to FIFO ----------------
  logic [255:0] dg_sh;
  logic [3:0]   dg_n;
  logic [4:0]   dg_pushed;     // hash outputs completely written to the FIFO
  logic [31:0]  hf_dout;
  logic         hf_empty, hf_rd, rd1, rd2;

  sync_fifo #(.W(32), .DEPTH(16)) u_hfifo (
    .clk, .rst_n, .clr(start), .wr(dg_n != 0), .din(dg_sh[255:224]), .rd(hf_rd),
    .dout(hf_dout), .empty(hf_empty), .full(), .count());

  // FIFO interconnect: the hash FIFO feeds the converter of the current mode
  assign hf_rd = mode_q ? rd2 : rd1;

  logic        b1_start, b1_idle, b1_fempty, b1_pop;
  logic [10:0] b1_dout;
  logic [6:0]  b1_count;
  bwc_1 #(.N(N)) u_bwc1 (
    .clk, .rst_n, .start(b1_start), .infifo_dout(hf_dout), .infifo_empty(hf_empty || mode_q),
    .infifo_read(rd1), .fifo_read(b1_pop), .fifo_dout(b1_dout), .fifo_empty(b1_fempty),
    .fifo_count(b1_count), .idle(b1_idle));

  logic b2_rel, b2_err, b2_idle, b2_releasing, b2_valid;
  bwc_2 u_bwc2 (
    .clk, .rst_n, .start(start), .infifo_dout(hf_dout), .infifo_empty(hf_empty || !mode_q),
    .infifo_read(rd2), .release_i(b2_rel), .output_valid(b2_valid), .output_ready(1'b1),
    .output_data(mask), .err(b2_err), .idle(b2_idle), .releasing(b2_releasing));
  assign mask_valid = b2_valid;
  assign b1_start   = start;

  // ---------------- release controller ----------------
  logic [4:0]  rel_k;          // next release number
  logic [7:0]  pop_left;
  logic        rel_busy, running;
  logic [4:0]  need_hash;
  logic        drained, can_rel;
  logic [7:0]  batch;

  assign need_hash = mode_q ? 5'(3 + 2*int'(rel_k)) : 5'(rel_k + 1);
  assign drained   = (dg_n == 0) && hf_empty && (mode_q ? b2_idle : b1_idle);
  assign can_rel   = running && !rel_busy && (dg_pushed >= need_hash) && drained;
  assign batch     = 8'(BPGM_MIN[rel_k[3:0]] - ((rel_k == 0) ? 0 : BPGM_MIN[4'(rel_k - 5'd1)]));
  assign b2_rel    = can_rel && mode_q;
  assign b1_pop    = rel_busy && !mode_q && (pop_left != 0);
  assign idx_valid = b1_pop;
  assign idx       = b1_dout;
  assign busy      = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= 1'b0; len_q <= '0; dfu_on <= 1'b0; fbuf_full <= 1'b0; fbuf <= '0;
      dfu_byte <= '0; dfu_blk <= '0; dfu_hash <= '0; sha_last <= 1'b0;
      dg_sh <= '0; dg_n <= '0; dg_pushed <= '0; rel_k <= '0; pop_left <= '0;
      rel_busy <= 1'b0; running <= 1'b0; done <= 1'b0; rnd_error <= 1'b0;
    end else if (start) begin
      mode_q <= mode; len_q <= msg_len; dfu_on <= 1'b1; fbuf_full <= 1'b0;
      dfu_byte <= '0; dfu_blk <= '0; dfu_hash <= '0; sha_last <= 1'b0;
      dg_n <= '0; dg_pushed <= '0; rel_k <= '0; pop_left <= '0;
      rel_busy <= 1'b0; running <= 1'b1; done <= 1'b0; rnd_error <= 1'b0;
    end else begin
      done <= 1'b0;
      // DFU: one byte per cycle into the block buffer
      if (dfu_on && !fbuf_full) begin
        fbuf[511 - 8*int'(dfu_byte) -: 8] <= cur;
        dfu_byte <= dfu_byte + 6'd1;
        if (dfu_byte == 6'd63) fbuf_full <= 1'b1;
      end
      // hand the block to the hash core and step to the next block
      if (sha_start) begin
        fbuf_full <= 1'b0;
        sha_last  <= blk_last;
        if (blk_last) begin
          dfu_blk  <= 5'(tfull);
          dfu_hash <= dfu_hash + 1;
          if (int'(dfu_hash) + 1 >= nhash) dfu_on <= 1'b0;
        end else begin
          dfu_blk <= dfu_blk + 5'd1;
        end
      end
      // write a finished hash output to the FIFO, one word per cycle
      if (sha_done && sha_last) begin
        dg_sh <= sha_digest; dg_n <= 4'd8;
      end else if (dg_n != 0) begin
        dg_sh <= {dg_sh[223:0], 32'h0};
        dg_n  <= dg_n - 4'd1;
        if (dg_n == 4'd1) dg_pushed <= dg_pushed + 5'd1;
      end
      // releases
      if (can_rel) begin
        if (!mode_q) begin
          if (7'(b1_count) < 7'(batch)) begin
            rnd_error <= 1'b1; done <= 1'b1; running <= 1'b0; dfu_on <= 1'b0;
          end else begin
            rel_busy <= 1'b1; pop_left <= batch;
          end
        end else begin
          rel_busy <= 1'b1;
        end
      end else if (rel_busy) begin
        if (!mode_q) begin
          if (pop_left > 1) pop_left <= pop_left - 8'd1;
          else begin
            pop_left <= '0; rel_busy <= 1'b0; rel_k <= rel_k + 5'd1;
            if (int'(rel_k) + 1 >= BPGM_HASHES) begin
              done <= 1'b1; running <= 1'b0; dfu_on <= 1'b0;
            end
          end
        end else if (b2_err) begin
          rnd_error <= 1'b1; done <= 1'b1; running <= 1'b0; rel_busy <= 1'b0; dfu_on <= 1'b0;
        end else if (!b2_releasing && !b2_rel) begin
          rel_busy <= 1'b0; rel_k <= rel_k + 5'd1;
          if (int'(rel_k) + 1 >= NREL) begin
            done <= 1'b1; running <= 1'b0; dfu_on <= 1'b0;
          end
        end
      end
    end
  end
endmodule
