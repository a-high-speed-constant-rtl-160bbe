// tb_bpgm_mgf: runs BPGM on random m (several lengths), b and hTrunc and compares the released
// index stream with the software reference (SHA-256 of sData || counter, 13-bit chunks,
// threshold, mod N, no repeats, batches of Table IV). Runs MGF on a random R4 string and
// compares the 25 released mask words with the reference. A second instance with an
// impossible first batch must report rnd_error. Cycle counts are printed and bounded.
module tb_bpgm_mgf;
  import ntru_pkg::*;
  import ntru_ref_pkg::*;
  localparam int N = 1499;
  logic clk = 0, rst_n = 0, start = 0, mode = 0;
  logic [7:0] msg_len = 0;
  logic [5:0] pdi_addr;
  logic [2:0] b_addr, h_addr;
  logic [4:0] r4_addr;
  logic [31:0] m_cm, b_cb, htrunc;
  logic [127:0] r4, mask;
  logic idx_valid, mask_valid, rnd_error, done, busy;
  logic [10:0] idx;
  int checks = 0, failures = 0;

  logic [31:0]  mmem [64], bmem [8], hmem [8];
  logic [127:0] rmem [24];
  assign m_cm = mmem[pdi_addr];
  assign b_cb = bmem[b_addr];
  assign htrunc = hmem[h_addr];
  assign r4 = rmem[r4_addr];

  bpgm_mgf #(.N(N)) dut (.*);

  // instance whose first batch can never be met (more than 19 indices from one hash output)
  localparam rel_tab_t BAD = '{25, 30, 47, 62, 79, 94, 110, 126, 142, 158, 0, 0, 0, 0, 0, 0};
  logic e_start = 0, e_done, e_err;
  bpgm_mgf #(.N(N), .BPGM_MIN(BAD)) dut_err (
    .clk, .rst_n, .start(e_start), .mode(1'b0), .msg_len(8'd10), .pdi_addr(), .m_cm,
    .b_addr(), .b_cb, .h_addr(), .htrunc, .r4_addr(), .r4, .idx_valid(), .idx(),
    .mask_valid(), .mask(), .rnd_error(e_err), .done(e_done), .busy());

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned got[$];
  logic [127:0] gotm[$];
  always @(posedge clk) begin
    if (idx_valid) got.push_back(idx);
    if (mask_valid) gotm.push_back(mask);
  end

  task automatic run(input bit md, input int len, output int cyc);
    got.delete(); gotm.delete();
    mode <= md; msg_len <= 8'(len); start <= 1;
    @(posedge clk); start <= 0;
    cyc = 1;
    @(negedge clk);
    while (!done) begin @(negedge clk); cyc++; end
    @(posedge clk);
  endtask

  initial begin
    int cyc;
    bytes_t seed;
    ints_t exp;
    int lens[3] = '{0, 100, 247};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (bmem[i]) bmem[i] = $urandom;
    foreach (hmem[i]) hmem[i] = $urandom;
    for (int t = 0; t < 3; t++) begin
      foreach (mmem[i]) mmem[i] = $urandom;
      seed.delete();
      seed.push_back(OID_DEF[23:16]); seed.push_back(OID_DEF[15:8]); seed.push_back(OID_DEF[7:0]);
      for (int k = 0; k < lens[t]; k++) seed.push_back(mmem[k/4][31 - 8*(k%4) -: 8]);
      for (int k = 0; k < 32; k++) seed.push_back(bmem[k/4][31 - 8*(k%4) -: 8]);
      for (int k = 0; k < 32; k++) seed.push_back(hmem[k/4][31 - 8*(k%4) -: 8]);
      exp = bpgm(seed, N, 10, BPGM_MIN_DEF);
      run(0, lens[t], cyc);
      $display("BPGM, %0d-byte message: %0d cycles, error %0d", lens[t], cyc, rnd_error);
      checks++;
      if (exp.size() == 0) begin
        if (!rnd_error) begin failures++; $display("reference short, hardware not"); end
      end else if (rnd_error || got.size() != exp.size()) begin
        failures++; $display("got %0d indices, expected %0d", got.size(), exp.size());
      end else begin
        int bad;
        bad = 0;
        foreach (exp[i]) if (got[i] != exp[i]) bad++;
        if (bad) begin failures++; $display("%0d indices differ", bad); end
      end
      checks++;
      if (cyc > 24 * 65 + 400) begin failures++; $display("BPGM too slow"); end
    end
    // MGF
    foreach (rmem[i]) rmem[i] = {$urandom, $urandom, $urandom, $urandom};
    seed.delete();
    for (int k = 0; k < (2*N + 7) / 8; k++) begin
      logic [7:0] bt;
      bt = rmem[k/16][127 - 8*(k%16) -: 8];
      if (k == (2*N + 7) / 8 - 1) bt[1:0] = 2'b00;     // 2N is not a multiple of 8
      rmem[k/16][127 - 8*(k%16) -: 8] = bt;
      seed.push_back(bt);
    end
    exp = mgf(seed, 11);
    run(1, 0, cyc);
    $display("MGF: %0d cycles, error %0d, %0d words", cyc, rnd_error, gotm.size());
    checks++;
    if (rnd_error || gotm.size() != 25 || exp.size() != 1600) begin
      failures++; $display("MGF size mismatch");
    end else begin
      int bad;
      bad = 0;
      for (int k = 0; k < 1600; k++)
        if (int'(gotm[k/64][127 - 2*(k%64) -: 2]) != exp[k]) bad++;
      if (bad) begin failures++; $display("%0d mask trits differ", bad); end
    end
    checks++;
    if (cyc > 27 * 65 + 400) begin failures++; $display("MGF too slow"); end
    // short batch
    e_start <= 1; @(posedge clk); e_start <= 0;
    while (!e_done) @(posedge clk);
    checks++;
    if (!e_err) begin failures++; $display("rnd_error not raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
