// tb_check1: polynomials with chosen numbers of 0s, 1s and -1s around the limit dm0 = 79
// (78, 79, 80 of one kind, the rest random) are checked against the expected verdict.
module tb_check1;
  localparam int N = 1499, DM0 = 79;
  logic [N-1:0][1:0] t;
  logic ok;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  check1 #(.N(N), .DM0(DM0)) dut (.*);
  initial begin
    for (int kind = 0; kind < 3; kind++)
      for (int cnt = DM0 - 2; cnt <= DM0 + 1; cnt++) begin
        // cnt coefficients of 'kind', the rest alternating over the two other values
        for (int j = 0; j < N; j++) begin
          if (j < cnt) t[j] = 2'(kind);
          else t[j] = 2'((kind + 1 + (j % 2)) % 3);
        end
        #1;
        checks++;
        if (ok !== (cnt >= DM0)) begin failures++; $display("kind %0d count %0d ok=%0d", kind, cnt, ok); end
      end
    for (int r = 0; r < 10; r++) begin
      for (int j = 0; j < N; j++) t[j] = 2'($urandom % 3);
      #1;
      checks++;
      if (ok !== 1'b1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
