// tb_range_conv_modp: every value 0..2047 is centred to [-1024, 1023] and reduced mod 3 by
// integer arithmetic, and compared with the unit's output.
module tb_range_conv_modp;
  localparam int N = 2048;
  logic [N-1:0][10:0] a;
  logic [N-1:0][1:0] y;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  range_conv_modp #(.N(N)) dut (.*);
  initial begin
    for (int j = 0; j < N; j++) a[j] = 11'(j);
    #1;
    for (int j = 0; j < N; j++) begin
      int v, m;
      v = (j >= 1024) ? j - 2048 : j;
      m = ((v % 3) + 3) % 3;
      checks++;
      if (int'(y[j]) != m) begin failures++; if (failures < 5) $display("%0d -> %0d exp %0d", j, y[j], m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
