// tb_t2b: random valid coefficient pairs are converted and checked against the inverse of the
// bit-to-trit table; a (-1,-1) pair must raise bad. Round trip through b2t is also checked.
module tb_t2b;
  localparam int N = 1499, MB = 2240, NG = (MB + 2) / 3;
  logic [N-1:0][1:0] trits, tr2;
  logic [MB-1:0] bits, bits_in;
  logic bad;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  t2b #(.N(N), .MB(MB)) dut (.*);
  b2t #(.N(N), .MB(MB)) u_b2t (.bits(bits_in), .trits(tr2));
  initial begin
    logic [3*NG-1:0] full;
    for (int r = 0; r < 20; r++) begin
      trits = '0;
      for (int g = 0; g < NG; g++) begin
        int unsigned v;
        v = $urandom % 8;
        if (g == NG - 1) v = v & 6;          // the last bit of the last group is padding
        trits[2*g]   = 2'(v / 3);
        trits[2*g+1] = 2'(v % 3);
        full[3*NG-1-3*g -: 3] = 3'(v);
      end
      #1;
      checks++;
      if (bits !== full[3*NG-1 -: MB] || bad) begin failures++; $display("round %0d wrong", r); end
      bits_in = bits;
      #1;
      checks++;
      if (tr2 !== trits) begin failures++; $display("round trip %0d wrong", r); end
      trits[2*($urandom % NG) +: 2] = {2'd2, 2'd2};
      #1;
      checks++;
      if (!bad) begin failures++; $display("(-1,-1) not flagged"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
