// tb_check3: equal random polynomials must pass; changing k random coefficients must fail and
// report k differences.
module tb_check3;
  localparam int N = 1499;
  logic [N-1:0][10:0] a, b;
  logic ok;
  logic [11:0] ndiff;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  check3 #(.N(N)) dut (.*);
  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int j = 0; j < N; j++) a[j] = 11'($urandom);
      b = a;
      #1;
      checks++;
      if (ok !== 1'b1 || ndiff != 0) failures++;
      for (int k = 0; k <= r; k++) b[(37 * k + r) % N] = b[(37 * k + r) % N] ^ 11'(1 << (k % 11));
      #1;
      checks++;
      if (ok !== 1'b0 || int'(ndiff) != r + 1) begin failures++; $display("ndiff %0d exp %0d", ndiff, r + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
