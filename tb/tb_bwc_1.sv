// tb_bwc_1: feeds random and crafted 32-bit words (all-zero words give repeated chunk 0, all-one
// words give chunks above the threshold) and compares the index FIFO contents with a model
// that cuts the bit stream into 13-bit chunks, drops values >= cthr, reduces mod N and drops
// repeats. Also checks the 64-cycle RAM clearing after start.
module tb_bwc_1;
  localparam int N = 1499;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] infifo_dout;
  logic infifo_empty, infifo_read, fifo_read = 0, fifo_empty, idle;
  logic [10:0] fifo_dout;
  logic [6:0] fifo_count;
  int checks = 0, failures = 0;
  logic [31:0] q [4096];
  int wp = 0;
  int unsigned exp[$];
  bit used[2048];
  int unsigned acc = 0, nacc = 0, ndup = 0, nthr = 0;

  int rp = 0;                                  // read pointer into q, advanced like a FIFO
  assign infifo_dout  = q[rp[11:0]];
  assign infifo_empty = (rp >= wp);
  always_ff @(posedge clk) if (infifo_read && rp < wp) rp <= rp + 1;

  bwc_1 #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_word(input logic [31:0] w);
    for (int i = 31; i >= 0; i--) begin
      acc = (acc << 1) | int'(w[i]); nacc++;
      if (nacc == 13) begin
        if (acc >= 7495) nthr++;
        else if (used[acc % N]) ndup++;
        else begin used[acc % N] = 1; exp.push_back(acc % N); end
        acc = 0; nacc = 0;
      end
    end
  endtask

  task automatic feed(input int nw, input int kind);
    logic [31:0] w;
    for (int i = 0; i < nw; i++) begin
      w = (kind == 0) ? $urandom : (kind == 1) ? 32'h0 : 32'hffffffff;
      model_word(w);
      q[wp[11:0]] = w; wp++;
    end
    @(posedge clk);
    while (!idle) @(posedge clk);
    // drain and compare
    while (!fifo_empty) begin
      checks++;
      if (exp.size() == 0) begin failures++; $display("extra index %0d", fifo_dout); end
      else begin
        int unsigned e;
        e = exp.pop_front();
        if (fifo_dout != 11'(e)) begin failures++; $display("idx %0d exp %0d", fifo_dout, e); end
      end
      fifo_read <= 1; @(posedge clk); fifo_read <= 0; @(negedge clk);
    end
    checks++;
    if (exp.size() != 0) begin failures++; $display("%0d indices missing", exp.size()); exp.delete(); end
  endtask

  initial begin
    int cyc;
    foreach (used[i]) used[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    cyc = 0;
    @(negedge clk);
    while (!idle) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 64) begin failures++; $display("clear took %0d", cyc); end
    for (int r = 0; r < 6; r++) feed(16, 0);
    feed(8, 1);
    feed(8, 2);
    for (int r = 0; r < 6; r++) feed(16, 0);
    checks++;
    if (ndup == 0 || nthr == 0) begin failures++; $display("no dup/threshold case"); end
    // restart clears the used-index RAM
    start <= 1; @(posedge clk); start <= 0;
    foreach (used[i]) used[i] = 0;
    acc = 0; nacc = 0;
    repeat (70) @(posedge clk);
    feed(8, 1);
    $display("duplicates %0d, over threshold %0d", ndup, nthr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
