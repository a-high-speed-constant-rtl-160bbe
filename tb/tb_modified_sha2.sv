// tb_modified_sha2: checks the SHA-256 core against known digests ("abc", the empty string,
// the two-block FIPS 180 example), against the reference model on random multi-block
// messages, the 65-cycle block period (done seen 65 cycles after start is taken), and the
// backup/restore of the chaining value
// (hash(P||T1) and hash(P||T2) sharing the prefix blocks P).
module tb_modified_sha2;
  import ntru_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, en_backup = 0, busy, done;
  logic [1:0] sel_init = 0;
  logic [511:0] block = '0;
  logic [255:0] digest;
  int checks = 0, failures = 0;

  modified_sha2 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bytes_t pad(input bytes_t msg);
    bytes_t m;
    longint unsigned bl;
    m = msg; bl = 64'(msg.size()) * 8;
    m.push_back(8'h80);
    while (m.size() % 64 != 56) m.push_back(8'h00);
    for (int i = 7; i >= 0; i--) m.push_back(8'(bl >> (8*i)));
    return m;
  endfunction

  task automatic run_block(input bytes_t m, input int blk, input logic [1:0] sel,
                           input logic bk);
    int cyc;
    for (int i = 0; i < 64; i++) block[511 - 8*i -: 8] = m[64*blk + i];
    sel_init <= sel; en_backup <= bk; start <= 1;
    @(posedge clk);
    start <= 0; cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    @(posedge clk);
    checks++;
    if (cyc != 65) begin failures++; $display("latency %0d != 65", cyc); end
  endtask

  task automatic hash_msg(input bytes_t msg, input logic [255:0] exp);
    bytes_t m;
    m = pad(msg);
    for (int b = 0; b < m.size() / 64; b++) run_block(m, b, (b == 0) ? 2'd1 : 2'd0, 1'b0);
    checks++;
    if (digest !== exp) begin failures++; $display("digest %h exp %h", digest, exp); end
  endtask

  initial begin
    bytes_t msg, p, m1, m2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    msg = '{8'h61, 8'h62, 8'h63};
    hash_msg(msg, 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad);
    msg.delete();
    hash_msg(msg, 256'he3b0c44298fc1c149afbf4c8996fb92427ae41e4649b934ca495991b7852b855);
    msg.delete();
    begin
      string s = "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq";
      for (int i = 0; i < s.len(); i++) msg.push_back(s[i]);
    end
    hash_msg(msg, 256'h248d6a61d20638b8e5c026930c3e6039a33ce45964ff2167f6ecedd419db06c1);
    for (int t = 0; t < 4; t++) begin
      msg.delete();
      for (int i = 0; i < 40 + 37*t; i++) msg.push_back(8'($urandom));
      hash_msg(msg, sha256(msg));
    end
    // backup / restore: prefix of two full blocks, then two different tails
    p.delete();
    for (int i = 0; i < 128; i++) p.push_back(8'($urandom));
    m1 = p; m2 = p;
    for (int i = 0; i < 20; i++) begin m1.push_back(8'($urandom)); m2.push_back(8'($urandom)); end
    m1 = pad(m1); m2 = pad(m2);
    run_block(m1, 0, 2'd1, 1'b0);
    run_block(m1, 1, 2'd0, 1'b1);
    run_block(m1, 2, 2'd0, 1'b0);
    checks++;
    if (digest !== sha256(m1[0:147])) begin failures++; $display("tail 1 mismatch"); end
    run_block(m2, 2, 2'd2, 1'b0);
    checks++;
    if (digest !== sha256(m2[0:147])) begin failures++; $display("restored tail mismatch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
