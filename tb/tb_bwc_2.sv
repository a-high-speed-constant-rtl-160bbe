// tb_bwc_2: feeds random bytes (with forced values 242, 243 and 255 around the threshold),
// requests releases and compares each group of five 128-bit mask words with a model that
// keeps bytes below 243 and writes their five base-3 digits, least significant first.
// Also checks that a release with fewer than 64 stored chunks raises err.
module tb_bwc_2;
  logic clk = 0, rst_n = 0, start = 0, release_i = 0, output_ready = 1;
  logic [31:0] infifo_dout;
  logic infifo_empty, infifo_read, output_valid, err, idle, releasing;
  logic [127:0] output_data;
  int checks = 0, failures = 0, nerr = 0;
  logic        in_wr = 0;
  logic [31:0] in_din = '0;
  logic [9:0] chunks[$];

  // input FIFO standing for the hash output FIFO
  sync_fifo #(.W(32), .DEPTH(64)) u_in (
    .clk, .rst_n, .clr(1'b0), .wr(in_wr), .din(in_din), .rd(infifo_read),
    .dout(infifo_dout), .empty(infifo_empty), .full(), .count());
  always @(posedge clk) if (err) nerr++;
  logic [31:0] wq[$];
  always @(posedge clk) begin
    in_wr <= (wq.size() > 0);
    if (wq.size() > 0) in_din <= wq.pop_front();
  end

  bwc_2 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(input int nw);
    logic [31:0] w;
    for (int i = 0; i < nw; i++) begin
      w = $urandom;
      if (i == 0) w[31:8] = {8'd242, 8'd243, 8'd255};
      for (int b = 0; b < 4; b++) begin
        int unsigned v;
        v = w[31 - 8*b -: 8];
        if (v < 243) begin
          logic [9:0] c;
          for (int t = 0; t < 5; t++) begin c[9 - 2*t -: 2] = 2'(v % 3); v = v / 3; end
          chunks.push_back(c);
        end
      end
      wq.push_back(w);
    end
    @(posedge clk);
    while (wq.size() > 0) @(posedge clk);
    repeat (2) @(posedge clk);
    while (!idle) @(posedge clk);
    @(posedge clk);
  endtask

  task automatic do_release();
    logic [639:0] expv;
    for (int c = 0; c < 64; c++) expv[639 - 10*c -: 10] = chunks.pop_front();
    release_i <= 1; @(posedge clk); release_i <= 0;
    for (int w = 0; w < 5; w++) begin
      @(negedge clk);
      while (!output_valid) @(negedge clk);
      checks++;
      if (output_data !== expv[639 - 128*w -: 128]) begin
        failures++; $display("word %0d mismatch", w);
      end
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    start <= 1; @(posedge clk); start <= 0;
    feed(24);                      // 96 bytes, as after three hash outputs
    do_release();
    for (int r = 0; r < 4; r++) begin
      feed(16);                    // two more hash outputs
      do_release();
    end
    // too few chunks: 8 bytes only after a restart
    start <= 1; @(posedge clk); start <= 0;
    chunks.delete();
    feed(2);
    release_i <= 1; @(posedge clk); release_i <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (nerr != 1 || releasing) begin failures++; $display("err count %0d", nerr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
