// tb_poly_addsub_q: random big coefficients (including 0 and 2047 to test the wrap) plus or
// minus random trits, checked against (a +/- t) mod 2048 computed with integers.
module tb_poly_addsub_q;
  localparam int N = 1499;
  logic sub;
  logic [N-1:0][10:0] a, y;
  logic [N-1:0][1:0] t;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  poly_addsub_q #(.N(N)) dut (.*);
  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int j = 0; j < N; j++) begin
        a[j] = (j % 7 == 0) ? 11'd2047 : (j % 7 == 1) ? 11'd0 : 11'($urandom);
        t[j] = 2'($urandom % 3);
      end
      sub = r[0];
      #1;
      for (int j = 0; j < N; j++) begin
        int s, e;
        s = (t[j] == 2) ? -1 : int'(t[j]);
        e = ((int'(a[j]) + (sub ? -s : s)) % 2048 + 2048) % 2048;
        checks++;
        if (int'(y[j]) != e) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
