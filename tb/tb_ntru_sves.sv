// tb_ntru_sves: end-to-end test of the SVES core at the ees1499ep1 parameter set.
// A key pair is made in the testbench (F with 79 +1s and 79 -1s, f = 1 + 3F, h = 3 g f^-1
// mod 2048, checked by f*h = 3g). The core encrypts messages of several lengths; every
// ciphertext coefficient is compared with a software model of SVES encryption
// (BPGM, r*h, MGF of R mod 4, B2T, m' = Mtrin + mask, e = R + m'). Each ciphertext is then
// decrypted and the message and its length must come back without a failure. Tampered
// ciphertexts must be rejected: all-zero e (Check 1), e[k]+4 (a different mask, Check 2),
// e[k]+1 and e[k]+12 (same mask, Check 3). Cycle counts are checked against bounds derived from the
// 65-cycle hash block, and two messages of equal length must take the same number of cycles.
// Every mechanism (h/e swap, chaining-value restore, BPGM batch,
// MGF release, the three checks) is counted and must occur.
module tb_ntru_sves;
  import ntru_pkg::*;
  import ntru_ref_pkg::*;
  localparam int N = N_DEF, D = DF_DEF, MAXMSG = MAXMSG_DEF, NP = N + 1;
  localparam int MB = DB_DEF + 8 + 8 * MAXMSG;

  logic clk = 0, rst_n = 0;
  logic pair_valid = 0, pair_ready;
  logic [21:0] pair_data = '0;
  logic f_we = 0, msg_we = 0, b_we = 0, start_enc = 0, start_dec = 0;
  logic [7:0] f_waddr = '0, octl = '0;
  logic [10:0] f_wdata = '0;
  logic [5:0] msg_waddr = '0;
  logic [2:0] b_waddr = '0;
  logic [31:0] msg_wdata = '0, b_wdata = '0;
  logic busy, done, fail;
  logic [2:0] fail_code;
  logic [N-1:0][10:0] e_out;
  logic [8*MAXMSG-1:0] cm_out;
  logic [7:0] coctl_out;
  int checks = 0, failures = 0;

  ntru_sves dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: state %0d count %0d bpgm busy %0d mult busy %0d", dut.st, dut.cnt, dut.bm_busy, dut.pm_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_swap = 0, n_restore = 0, n_batch = 0, n_mgfrel = 0, n_c1 = 0, n_c2 = 0, n_c3 = 0;
  always @(posedge clk) begin
    if (dut.pm_swap) n_swap++;
    if (dut.u_bm.sha_start && dut.u_bm.sha_sel == 2'd2) n_restore++;
    if (dut.u_bm.can_rel && !dut.u_bm.mode_q) n_batch++;
    if (dut.u_bm.b2_rel) n_mgfrel++;
  end

  poly_t fpoly, hpoly, gpoly, finv;
  int unsigned fidx[2*D];
  logic [31:0] mwords[64], bwords[8];

  task automatic write_key();
    for (int k = 0; k < NP / 2; k++) begin
      pair_valid <= 1;
      pair_data  <= {11'((2*k + 1 < N) ? hpoly[2*k+1] : 0), 11'(hpoly[2*k])};
      @(posedge clk);
    end
    pair_valid <= 0;
    for (int i = 0; i < 2*D; i++) begin
      f_we <= 1; f_waddr <= 8'(i); f_wdata <= 11'(fidx[i]);
      @(posedge clk);
    end
    f_we <= 0;
    @(posedge clk);
  endtask

  task automatic write_msg(input int len);
    foreach (mwords[i]) mwords[i] = $urandom;
    foreach (bwords[i]) bwords[i] = $urandom;
    for (int i = 0; i < 64; i++) begin
      msg_we <= 1; msg_waddr <= 6'(i); msg_wdata <= mwords[i]; @(posedge clk);
    end
    msg_we <= 0;
    for (int i = 0; i < 8; i++) begin
      b_we <= 1; b_waddr <= 3'(i); b_wdata <= bwords[i]; @(posedge clk);
    end
    b_we <= 0;
    octl <= 8'(len);
    @(posedge clk);
  endtask

  function automatic logic [7:0] mbyte(input int k);
    return mwords[k/4][31 - 8*(k%4) -: 8];
  endfunction

  // software SVES encryption; returns 0 if the reference run fails (short batch or Check 1)
  function automatic bit ref_encrypt(input int len, output int unsigned e[N]);
    bytes_t seed;
    ints_t r, mask;
    poly_t rp, R;
    logic [MB+1:0] mbin;
    int unsigned mt[N];
    int c0, c1, c2;
    seed.push_back(OID_DEF[23:16]); seed.push_back(OID_DEF[15:8]); seed.push_back(OID_DEF[7:0]);
    for (int k = 0; k < len; k++) seed.push_back(mbyte(k));
    for (int k = 0; k < 32; k++) seed.push_back(bwords[k/4][31 - 8*(k%4) -: 8]);
    // hTrunc: first 256 bits of h written as 11-bit coefficients
    begin
      logic [24*11-1:0] hs;
      for (int j = 0; j < 24; j++) hs[24*11-1-11*j -: 11] = 11'(hpoly[j]);
      for (int k = 0; k < 32; k++) seed.push_back(hs[24*11-1-8*k -: 8]);
    end
    r = bpgm(seed, N, 10, BPGM_MIN_DEF);
    if (r.size() == 0) return 0;
    rp = new[N];
    foreach (rp[i]) rp[i] = 0;
    foreach (r[i]) rp[r[i]] = (i < DR_DEF) ? 1 : 2047;
    R = ring_mul(rp, hpoly, N);
    seed.delete();
    for (int k = 0; k < (2*N + 7) / 8; k++) begin
      logic [7:0] bt;
      for (int q = 0; q < 4; q++) bt[7-2*q -: 2] = (4*k + q < N) ? 2'(R[4*k + q]) : 2'b00;
      seed.push_back(bt);
    end
    mask = mgf(seed, 11);
    if (mask.size() == 0) return 0;
    mbin = '0;
    for (int w = 0; w < 8; w++) mbin[MB+1-32*w -: 32] = bwords[w];
    mbin[MB+1-256 -: 8] = 8'(len);
    for (int k = 0; k < len; k++) mbin[MB+1-264-8*k -: 8] = mbyte(k);
    c0 = 0; c1 = 0; c2 = 0;
    for (int j = 0; j < N; j++) begin
      int v, t;
      t = 0;
      if (j / 2 < (MB + 2) / 3) begin
        v = int'(mbin[MB+1-3*(j/2) -: 3]);
        t = (j % 2 == 0) ? v / 3 : v % 3;
      end
      t = (t + int'(mask[j])) % 3;
      if (t == 0) c0++; else if (t == 1) c1++; else c2++;
      e[j] = (R[j] + ((t == 2) ? 2047 : t)) % 2048;
    end
    return (c0 >= DM0_DEF && c1 >= DM0_DEF && c2 >= DM0_DEF);
  endfunction

  task automatic encrypt(output int cyc);
    start_enc <= 1; @(posedge clk); start_enc <= 0;
    cyc = 1;
    @(negedge clk);
    while (!done) begin @(negedge clk); cyc++; end
    @(posedge clk);
  endtask

  task automatic decrypt(input int unsigned e[N], output int cyc);
    start_dec <= 1; @(posedge clk); start_dec <= 0;
    cyc = 1;
    for (int k = 0; k < NP / 2; k++) begin
      pair_valid <= 1;
      pair_data  <= {11'((2*k + 1 < N) ? e[2*k+1] : 0), 11'(e[2*k])};
      @(posedge clk); cyc++;
      while (!pair_ready) begin @(posedge clk); cyc++; end
    end
    pair_valid <= 0;
    @(negedge clk);
    while (!done) begin @(negedge clk); cyc++; end
    @(posedge clk);
  endtask

  initial begin
    int cyc, len, ok_runs;
    int unsigned e[N], et[N];
    int lens[4] = '{247, 1, 100, 247};
    int enc_cyc[4], dec_cyc[4];
    poly_t fh;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---------- key pair ----------
    fpoly = new[N]; gpoly = new[N];
    foreach (fpoly[i]) begin fpoly[i] = 0; gpoly[i] = 0; end
    for (int i = 0; i < 2*D; i++) begin
      int unsigned p;
      do p = $urandom % N; while (fpoly[p] != 0);
      fidx[i] = p;
      fpoly[p] = (i < D) ? 1 : 2047;
    end
    foreach (fpoly[i]) fpoly[i] = (3 * fpoly[i]) % 2048;
    fpoly[0] = (fpoly[0] + 1) % 2048;
    for (int i = 0; i < N; i++) gpoly[i] = ($urandom % 3 == 0) ? 1 : (($urandom % 2) ? 2047 : 0);
    finv = ring_inv(fpoly, N);
    checks++;
    if (finv.size() != N) begin
      failures++; $display("f not invertible");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    foreach (gpoly[i]) gpoly[i] = (3 * gpoly[i]) % 2048;
    hpoly = ring_mul(gpoly, finv, N);
    fh = ring_mul(fpoly, hpoly, N);
    begin
      int bad;
      bad = 0;
      foreach (fh[i]) if (fh[i] != gpoly[i]) bad++;
      if (bad) begin failures++; $display("key check f*h != 3g (%0d)", bad); end
    end
    write_key();
    ok_runs = 0;
    // ---------- encrypt / decrypt round trips ----------
    foreach (enc_cyc[i]) begin enc_cyc[i] = -1; dec_cyc[i] = -2; end
    for (int t = 0; t < 4; t++) begin
      bit ref_ok;
      len = lens[t];
      write_msg(len);
      ref_ok = ref_encrypt(len, e);
      encrypt(cyc);
      enc_cyc[t] = cyc;
      $display("encryption, %0d-byte message: %0d cycles, fail=%0d code=%0d (model ok=%0d)",
               len, cyc, fail, fail_code, ref_ok);
      checks++;
      if (fail == ref_ok) begin failures++; $display("fail flag disagrees with the model"); end
      if (fail) continue;
      begin
        int bad;
        bad = 0;
        for (int j = 0; j < N; j++) if (int'(e_out[j]) != e[j]) bad++;
        checks++;
        if (bad) begin failures++; $display("%0d ciphertext coefficients differ", bad); end
      end
      checks++;
      if (cyc > 4000) begin failures++; $display("encryption too slow"); end
      decrypt(e, cyc);
      dec_cyc[t] = cyc;
      $display("decryption: %0d cycles, fail=%0d code=%0d, length %0d", cyc, fail, fail_code, coctl_out);
      checks++;
      if (fail || coctl_out != 8'(len)) begin failures++; $display("decryption failed"); end
      else begin
        int bad;
        bad = 0;
        for (int k = 0; k < MAXMSG; k++)
          if (cm_out[8*MAXMSG-1-8*k -: 8] != ((k < len) ? mbyte(k) : 8'h00)) bad++;
        checks++;
        if (bad) begin failures++; $display("%0d message bytes differ", bad); end
        ok_runs++;
      end
      checks++;
      if (cyc > 4600) begin failures++; $display("decryption too slow"); end
      // ---------- tampered ciphertexts ----------
      if (t == 0) begin
        foreach (et[j]) et[j] = 0;
        decrypt(et, cyc);
        checks++;
        if (!fail || fail_code != 3'd2) begin failures++; $display("zero e: code %0d", fail_code); end
        else n_c1++;
        et = e; et[5] = (et[5] + 12) % 2048;
        decrypt(et, cyc);
        checks++;
        if (!fail || fail_code != 3'd4) begin failures++; $display("e+12: code %0d", fail_code); end
        else n_c3++;
        // +1 moves ci[k] by one as well, so cR and the mask stay the same: only Check 3 sees it
        et = e; et[7] = (et[7] + 1) % 2048;
        decrypt(et, cyc);
        checks++;
        if (!fail || fail_code != 3'd4) begin failures++; $display("e+1: code %0d", fail_code); end
        else n_c3++;
        // +4 changes cR mod 4, hence the whole mask: the decoded block is garbage (Check 2)
        et = e; et[9] = (et[9] + 4) % 2048;
        decrypt(et, cyc);
        checks++;
        if (!fail || fail_code != 3'd3) begin failures++; $display("e+4: code %0d", fail_code); end
        else n_c2++;
      end
    end
    // constant time: two encryptions (and decryptions) of equal length with different data
    checks++;
    if (enc_cyc[0] != enc_cyc[3] || dec_cyc[0] != dec_cyc[3]) begin
      failures++; $display("cycle counts depend on the data: %0d/%0d, %0d/%0d",
                           enc_cyc[0], enc_cyc[3], dec_cyc[0], dec_cyc[3]);
    end
    checks++;
    if (ok_runs == 0) begin failures++; $display("no successful round trip"); end
    $display("mechanisms: swap %0d, restore %0d, BPGM batches %0d, MGF releases %0d, check1 %0d, check2 %0d, check3 %0d",
             n_swap, n_restore, n_batch, n_mgfrel, n_c1, n_c2, n_c3);
    checks++;
    if (n_swap == 0 || n_restore == 0 || n_batch == 0 || n_mgfrel == 0 || n_c1 == 0 || n_c2 == 0 || n_c3 == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
