// tb_trit_addsub: random ternary polynomials, sum and difference checked per coefficient
// against signed arithmetic on -1/0/+1 reduced back to the residue encoding.
module tb_trit_addsub;
  localparam int N = 1499;
  logic sub;
  logic [N-1:0][1:0] a, b, y;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  trit_addsub #(.N(N)) dut (.*);
  function automatic int sv(input logic [1:0] t); return (t == 2) ? -1 : int'(t); endfunction
  function automatic logic [1:0] enc(input int v);
    return 2'(((v % 3) + 3) % 3);
  endfunction
  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int j = 0; j < N; j++) begin a[j] = 2'($urandom % 3); b[j] = 2'($urandom % 3); end
      sub = r[0];
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (y[j] !== enc(sub ? sv(a[j]) - sv(b[j]) : sv(a[j]) + sv(b[j]))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
