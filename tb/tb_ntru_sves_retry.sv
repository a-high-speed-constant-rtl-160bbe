// tb_ntru_sves_retry: the constant-time failure path of the SVES core. The core is built with
// a BPGM release table whose first entry (20 indices after the first hash) can never be met,
// since one 256-bit digest holds only 19 chunks of 13 bits. Every encryption must then end
// with fail = 1 and fail_code = 1 (a new seed b is needed), right after the first batch, and
// the core must accept a new operation afterwards. Two encryptions with different data must
// take the same number of cycles.
module tb_ntru_sves_retry;
  import ntru_pkg::*;
  localparam int N = N_DEF, MAXMSG = MAXMSG_DEF;
  localparam rel_tab_t BAD_MIN = '{20, 30, 47, 62, 79, 94, 110, 126, 142, 158, 0, 0, 0, 0, 0, 0};

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

  ntru_sves #(.BPGM_MIN(BAD_MIN)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_err = 0;
  always @(posedge clk) if (dut.bm_err && dut.bm_done) n_err++;

  task automatic run_enc(input int len, output int cyc);
    for (int i = 0; i < 8; i++) begin
      b_we <= 1; b_waddr <= 3'(i); b_wdata <= $urandom; @(posedge clk);
    end
    b_we <= 0;
    for (int i = 0; i < 64; i++) begin
      msg_we <= 1; msg_waddr <= 6'(i); msg_wdata <= $urandom; @(posedge clk);
    end
    msg_we <= 0; octl <= 8'(len);
    @(posedge clk);
    start_enc <= 1; @(posedge clk); start_enc <= 0;
    cyc = 1;
    @(negedge clk);
    while (!done) begin @(negedge clk); cyc++; end
    @(posedge clk);
  endtask

  initial begin
    int c1, c2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < (N + 1) / 2; k++) begin
      pair_valid <= 1; pair_data <= {11'($urandom), 11'($urandom)}; @(posedge clk);
    end
    pair_valid <= 0;
    run_enc(247, c1);
    $display("first encryption: %0d cycles, fail=%0d code=%0d", c1, fail, fail_code);
    checks++;
    if (!fail || fail_code != 3'd1) begin failures++; $display("short batch not reported"); end
    // the first batch is due after the first hash: 5 blocks of 65 cycles plus formatting
    checks++;
    if (c1 > 5 * 65 + 200) begin failures++; $display("failure reported too late"); end
    run_enc(247, c2);
    checks++;
    if (!fail || fail_code != 3'd1) begin failures++; $display("second run: code %0d", fail_code); end
    checks++;
    if (c1 != c2) begin failures++; $display("cycle counts differ: %0d %0d", c1, c2); end
    checks++;
    if (n_err != 2) begin failures++; $display("rnd_error seen %0d times", n_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
