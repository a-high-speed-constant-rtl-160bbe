// ntru_sves: NTRUEncrypt SVES (IEEE 1363.1) encryption and decryption on one shared datapath,
// parameter set ees1499ep1 by default.
//
// Encryption of message m (octl bytes) with random data b and public key h:
//   r   = BPGM(OID || m || b || hTrunc)          indices of the dr +1s and dr -1s of r
//   R   = r * h (mod q)                          poly_mult, fed while BPGM releases indices
//   mask= MGF(R mod 4)
//   m'  = B2T(b || octl || m || 0...) + mask (mod 3), Check 1 on m'
//   e   = R + m' (mod q)                         ciphertext, on e_out
// Decryption of ciphertext e with private key f = 1 + 3F:
//   a   = f * e = e + 3 * (F * e)                poly_mult (e parked in place of h)
//   ci  = centre(a) mod 3, Check 1 on ci;  cR = e - ci
//   cMbin = T2B(ci - MGF(cR mod 4)) = cb || coctl || cm || padding, Check 2 (padding zero)
//   cR' = BPGM(OID || cm || cb || hTrunc) * h, Check 3: cR' == cR
// A failed check stops the operation at once with `fail` and a code on `fail_code`
// (1 too few BPGM indices or mask chunks in a batch, a new b is needed; 2 Check 1;
// 3 Check 2; 4 Check 3).
//
// Loading (in idle): h through `pair_data` two coefficients per cycle (coefficients 0,1 first),
// the 2*DF indices of F through the F-index write port (first DF of +1s, then DF of -1s),
// message words and b words through their write ports (big-endian bytes). The key stays
// stored for any number of operations. During decryption, after `start_dec`, the ciphertext is
// taken through `pair_data`; `pair_ready` stays low for the cycle after `start_dec`, in which
// h is moved into the multiplier's PISO. hTrunc is the first PKLEN bits of h written as
// 11-bit coefficients, coefficient 0 first, most significant bit first.
// The data flow follows the document; the load ports, the fail codes and result ports in
// place of the document's PDI/SDI/DO bus interface are this design's choices.
// Timing at the defaults: encryption of a 247-byte message 3611 cycles (BPGM with r*h 1681,
// MGF 1926); decryption 750 load cycles, 164 for f*e, then MGF and BPGM as above.
module ntru_sves
  import ntru_pkg::*;
#(
  parameter int unsigned N      = N_DEF,
  parameter int unsigned DR     = DR_DEF,
  parameter int unsigned DF     = DF_DEF,
  parameter int unsigned DB     = DB_DEF,
  parameter int unsigned DM0    = DM0_DEF,
  parameter int unsigned MAXMSG = MAXMSG_DEF,
  parameter int unsigned PKLEN  = PKLEN_DEF,
  parameter logic [23:0] OID    = OID_DEF,
  parameter int unsigned BPGM_HASHES = BPGM_HASHES_DEF,
  parameter rel_tab_t    BPGM_MIN    = BPGM_MIN_DEF,
  parameter int unsigned MGF_HASHES  = MGF_HASHES_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   pair_valid,
  input  logic [2*QB-1:0]        pair_data,
  output logic                   pair_ready,
  input  logic                   f_we,
  input  logic [7:0]             f_waddr,
  input  logic [IDXW-1:0]        f_wdata,
  input  logic                   msg_we,
  input  logic [5:0]             msg_waddr,
  input  logic [31:0]            msg_wdata,
  input  logic                   b_we,
  input  logic [2:0]             b_waddr,
  input  logic [31:0]            b_wdata,
  input  logic [7:0]             octl,
  input  logic                   start_enc,
  input  logic                   start_dec,
  output logic                   busy,
  output logic                   done,
  output logic                   fail,
  output logic [2:0]             fail_code,
  output logic [N-1:0][QB-1:0]   e_out,
  output logic [8*MAXMSG-1:0]    cm_out,
  output logic [7:0]             coctl_out
);
  localparam int unsigned MB     = DB + 8 + 8*MAXMSG;
  localparam int unsigned NP     = N + (N % 2);
  localparam int unsigned NREL   = (MGF_HASHES - 1) / 2;
  localparam int unsigned NMW    = 5 * NREL;              // 128-bit mask words
  localparam int unsigned R4W    = (2*N + 127) / 128;     // 128-bit words of R4
  localparam int unsigned HTC    = (PKLEN + QB - 1) / QB; // coefficients holding hTrunc

  typedef enum logic [3:0] {
    S_IDLE, S_ENC_BPGM, S_ENC_MGF, S_ENC_FIN,
    S_DEC_LOAD, S_DEC_MULT, S_DEC_CI, S_DEC_MGF, S_DEC_T2B, S_DEC_BPGM, S_DEC_CHK3
  } state_t;
  state_t st;

  // ---------------- small memories ----------------
  logic [31:0]     msg_ram [64];
  logic [31:0]     b_ram   [8];
  logic [IDXW-1:0] f_ram   [256];
  always_ff @(posedge clk) begin
    if (msg_we) msg_ram[msg_waddr] <= msg_wdata;
    if (b_we)   b_ram[b_waddr]     <= b_wdata;
    if (f_we)   f_ram[f_waddr]     <= f_wdata;
  end

  // ---------------- polynomial multiplier ----------------
  logic                 pm_shift, pm_swap, pm_step, pm_neg, pm_first, pm_x3, pm_busy;
  logic [IDXW-1:0]      pm_idx;
  logic [N-1:0][QB-1:0] pm_a, pm_b, pm_sum;
  poly_mult #(.N(N)) u_pm (
    .clk, .rst_n, .sipo_shift(pm_shift), .h_e(pair_data), .swap(pm_swap),
    .step_valid(pm_step), .step_idx(pm_idx), .step_neg(pm_neg), .step_first(pm_first),
    .step_x3(pm_x3), .a_par(pm_a), .b_par(pm_b), .sum(pm_sum), .busy(pm_busy));

  // ---------------- BPGM / MGF ----------------
  logic         bm_start, bm_mode, bm_idx_v, bm_mask_v, bm_err, bm_done, bm_busy;
  logic [7:0]   bm_len;
  logic [5:0]   pdi_addr;
  logic [2:0]   b_addr, h_addr;
  logic [4:0]   r4_addr;
  logic [31:0]  m_cm, b_cb, htrunc;
  logic [127:0] r4_word, bm_mask;
  logic [10:0]  bm_idx;
  bpgm_mgf #(.N(N), .DB(DB), .PKLEN(PKLEN), .OID(OID), .BPGM_HASHES(BPGM_HASHES),
             .BPGM_MIN(BPGM_MIN), .MGF_HASHES(MGF_HASHES)) u_bm (
    .clk, .rst_n, .start(bm_start), .mode(bm_mode), .msg_len(bm_len),
    .pdi_addr, .m_cm, .b_addr, .b_cb, .h_addr, .htrunc, .r4_addr, .r4(r4_word),
    .idx_valid(bm_idx_v), .idx(bm_idx), .mask_valid(bm_mask_v), .mask(bm_mask),
    .rnd_error(bm_err), .done(bm_done), .busy(bm_busy));

  // ---------------- registers of intermediate values ----------------
  logic [N-1:0][1:0]    ci_q;
  logic [N-1:0][QB-1:0] cr_q;
  logic [NMW-1:0][127:0] mask_q;
  logic [$clog2(NMW+1)-1:0] mask_n;
  logic [MB-1:0]        cmbin_q;
  logic [IDXW-1:0]      cnt;
  logic                 is_dec;

  // mask words to trits
  logic [N-1:0][1:0] mask_t;
  always_comb
    for (int k = 0; k < N; k++) mask_t[k] = mask_q[NMW-1-k/64][127-2*(k%64) -: 2];

  // hTrunc from the stored h (SIPO side of the multiplier)
  logic [QB*HTC-1:0] hstream;
  always_comb for (int j = 0; j < HTC; j++) hstream[QB*HTC-1-QB*j -: QB] = pm_a[j];
  assign htrunc = hstream[QB*HTC-1 - 32*int'(h_addr) -: 32];

  // R4 = coefficients mod 4, coefficient 0 first, two bits each
  logic [N-1:0][QB-1:0] r4_src;
  logic [128*R4W-1:0]   r4_stream;
  assign r4_src = is_dec ? cr_q : pm_sum;
  always_comb begin
    r4_stream = '0;
    for (int j = 0; j < N; j++) r4_stream[128*R4W-1-2*j -: 2] = r4_src[j][1:0];
  end
  assign r4_word = r4_stream[128*R4W-1 - 128*int'(r4_addr) -: 128];

  // message and b sources of BPGM: input memories (encryption) or cMbin (decryption)
  logic [8*MAXMSG-1:0] cm_field;
  logic [DB-1:0]       cb_field;
  logic [7:0]          coctl;
  assign cb_field = cmbin_q[MB-1 -: DB];
  assign coctl    = cmbin_q[MB-1-DB -: 8];
  assign cm_field = cmbin_q[8*MAXMSG-1:0];
  always_comb begin
    logic [8*MAXMSG+31:0] cmx;
    cmx  = {cm_field, 32'h0};
    m_cm = is_dec ? cmx[8*MAXMSG+31 - 32*int'(pdi_addr) -: 32] : msg_ram[pdi_addr];
    b_cb = is_dec ? cb_field[DB-1 - 32*int'(b_addr) -: 32]      : b_ram[b_addr];
  end

  // ---------------- encryption coefficient-wise units ----------------
  logic [MB-1:0]        mbin;
  logic [N-1:0][1:0]    mtrin, mprime;
  logic [N-1:0][QB-1:0] e_calc;
  logic                 c1_enc_ok;
  always_comb begin
    logic [8*MAXMSG-1:0] mf;
    for (int k = 0; k < MAXMSG; k++)
      mf[8*MAXMSG-1-8*k -: 8] = (k < int'(octl)) ? msg_ram[k/4][31-8*(k%4) -: 8] : 8'h00;
    for (int w = 0; w < DB/32; w++) mbin[MB-1-32*w -: 32] = b_ram[w];
    mbin[MB-1-DB -: 8] = octl;
    mbin[8*MAXMSG-1:0] = mf;
  end
  b2t            #(.N(N), .MB(MB)) u_b2t  (.bits(mbin), .trits(mtrin));
  trit_addsub    #(.N(N))          u_madd (.sub(1'b0), .a(mtrin), .b(mask_t), .y(mprime));
  check1         #(.N(N), .DM0(DM0)) u_c1e (.t(mprime), .ok(c1_enc_ok));
  poly_addsub_q  #(.N(N))          u_eadd (.sub(1'b0), .a(pm_sum), .t(mprime), .y(e_calc));

  // ---------------- decryption coefficient-wise units ----------------
  logic [N-1:0][1:0]    ci_calc, cmtrin;
  logic [N-1:0][QB-1:0] cr_calc;
  logic [MB-1:0]        cmbin_calc;
  logic                 c1_dec_ok, c2_ok, t2b_bad, c3_ok;
  logic [IDXW:0]        c3_ndiff;
  range_conv_modp #(.N(N))          u_rc   (.a(pm_sum), .y(ci_calc));
  check1          #(.N(N), .DM0(DM0)) u_c1d (.t(ci_calc), .ok(c1_dec_ok));
  poly_addsub_q   #(.N(N))          u_csub (.sub(1'b1), .a(pm_a), .t(ci_calc), .y(cr_calc));
  trit_addsub     #(.N(N))          u_msub (.sub(1'b1), .a(ci_q), .b(mask_t), .y(cmtrin));
  t2b             #(.N(N), .MB(MB)) u_t2b  (.trits(cmtrin), .bits(cmbin_calc), .bad(t2b_bad));
  check2          #(.MAXMSG(MAXMSG)) u_c2  (.mfield(cmbin_calc[8*MAXMSG-1:0]),
                                            .coctl(cmbin_calc[MB-1-DB -: 8]), .ok(c2_ok));
  check3          #(.N(N))          u_c3   (.a(pm_sum), .b(cr_q), .ok(c3_ok), .ndiff(c3_ndiff));

  // ---------------- controller ----------------
  assign pair_ready = (st == S_IDLE && !start_dec) || (st == S_DEC_LOAD && !pm_swap);
  assign pm_shift   = pair_valid && pair_ready;
  assign busy       = (st != S_IDLE);

  // indices released by BPGM go straight into the multiplier
  logic mult_feed;
  assign mult_feed = (st == S_ENC_BPGM || st == S_DEC_BPGM) && bm_idx_v;

  always_comb begin
    pm_step = 1'b0; pm_idx = '0; pm_neg = 1'b0; pm_first = 1'b0; pm_x3 = 1'b0;
    if (mult_feed) begin
      pm_step = 1'b1; pm_idx = bm_idx;
      pm_neg = (int'(cnt) >= DR); pm_first = (cnt == 0);
    end else if (st == S_DEC_MULT) begin
      if (int'(cnt) < 2*DF) begin
        pm_step = 1'b1; pm_idx = f_ram[cnt[7:0]];
        pm_neg = (int'(cnt) >= DF); pm_first = (cnt == 0);
      end else if (int'(cnt) == 2*DF) begin
        pm_step = 1'b1; pm_x3 = 1'b1;            // sum = 3 * (F * e)
      end else if (int'(cnt) == 2*DF + 1) begin
        pm_step = 1'b1; pm_idx = '0;             // sum += e
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; is_dec <= 1'b0; done <= 1'b0; fail <= 1'b0; fail_code <= '0;
      bm_start <= 1'b0; bm_mode <= 1'b0; bm_len <= '0; pm_swap <= 1'b0;
      mask_n <= '0; mask_q <= '0; ci_q <= '0; cr_q <= '0; cmbin_q <= '0;
      e_out <= '0; cm_out <= '0; coctl_out <= '0;
    end else begin
      done <= 1'b0; bm_start <= 1'b0; pm_swap <= 1'b0;
      if (bm_mask_v && int'(mask_n) < NMW) begin
        mask_q <= {mask_q[NMW-2:0], bm_mask};
        mask_n <= mask_n + 1'b1;
      end
      if (mult_feed) cnt <= cnt + 1'b1;
      unique case (st)
        S_IDLE: begin
          cnt <= '0;
          if (start_enc) begin
            st <= S_ENC_BPGM; is_dec <= 1'b0; fail <= 1'b0; fail_code <= '0;
            bm_start <= 1'b1; bm_mode <= 1'b0; bm_len <= octl;
          end else if (start_dec) begin
            st <= S_DEC_LOAD; is_dec <= 1'b1; fail <= 1'b0; fail_code <= '0;
            pm_swap <= 1'b1;                         // park h in the PISO
          end
        end
        // ---------- encryption ----------
        S_ENC_BPGM: if (bm_done) begin
          if (bm_err) begin
            fail <= 1'b1; fail_code <= 3'd1; done <= 1'b1; st <= S_IDLE;
          end else begin
            st <= S_ENC_MGF; bm_start <= 1'b1; bm_mode <= 1'b1; mask_n <= '0;
          end
        end
        S_ENC_MGF: if (bm_done) begin
          if (bm_err) begin
            fail <= 1'b1; fail_code <= 3'd1; done <= 1'b1; st <= S_IDLE;
          end else st <= S_ENC_FIN;
        end
        S_ENC_FIN: begin
          if (!c1_enc_ok) begin fail <= 1'b1; fail_code <= 3'd2; end
          else e_out <= e_calc;
          done <= 1'b1; st <= S_IDLE;
        end
        // ---------- decryption ----------
        S_DEC_LOAD: if (pm_shift) begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == NP/2 - 1) begin st <= S_DEC_MULT; cnt <= '0; end
        end
        S_DEC_MULT: begin
          if (int'(cnt) <= 2*DF + 1) cnt <= cnt + 1'b1;
          else if (!pm_busy) st <= S_DEC_CI;
        end
        S_DEC_CI: begin
          ci_q <= ci_calc; cr_q <= cr_calc;
          pm_swap <= 1'b1;                           // h back to the SIPO, e to the PISO
          if (!c1_dec_ok) begin
            fail <= 1'b1; fail_code <= 3'd2; done <= 1'b1; st <= S_IDLE;
          end else begin
            st <= S_DEC_MGF; bm_start <= 1'b1; bm_mode <= 1'b1; mask_n <= '0;
          end
        end
        S_DEC_MGF: if (bm_done) begin
          if (bm_err) begin
            fail <= 1'b1; fail_code <= 3'd1; done <= 1'b1; st <= S_IDLE;
          end else st <= S_DEC_T2B;
        end
        S_DEC_T2B: begin
          cmbin_q <= cmbin_calc;
          if (!c2_ok || t2b_bad) begin
            fail <= 1'b1; fail_code <= 3'd3; done <= 1'b1; st <= S_IDLE;
          end else begin
            st <= S_DEC_BPGM; cnt <= '0;
            bm_start <= 1'b1; bm_mode <= 1'b0; bm_len <= cmbin_calc[MB-1-DB -: 8];
          end
        end
        S_DEC_BPGM: if (bm_done) begin
          if (bm_err) begin
            fail <= 1'b1; fail_code <= 3'd1; done <= 1'b1; st <= S_IDLE;
          end else st <= S_DEC_CHK3;
        end
        S_DEC_CHK3: if (!pm_busy) begin
          if (!c3_ok) begin
            fail <= 1'b1; fail_code <= 3'd4;
          end else begin
            cm_out <= cm_field; coctl_out <= coctl;
          end
          done <= 1'b1; st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
