// tb_poly_mult: loads a random polynomial a through the two-coefficient SIPO port, multiplies
// it by random sparse ternary polynomials (d +1s and d -1s) and compares every coefficient with
// a direct convolution mod 2048. Then checks the f*e sequence (F*e, x3, +e), the swap between
// SIPO and PISO, and that d steps take d+2 cycles to reach `sum` (one index per cycle).
module tb_poly_mult;
  localparam int N = 1499, D = 79, NP = N + 1;
  logic clk = 0, rst_n = 0, sipo_shift = 0, swap = 0;
  logic step_valid = 0, step_neg = 0, step_first = 0, step_x3 = 0;
  logic [21:0] h_e = '0;
  logic [10:0] step_idx = '0;
  logic [N-1:0][10:0] a_par, b_par, sum;
  logic busy;
  int checks = 0, failures = 0;
  int unsigned a [N], a2 [N], idx [2*D], ref_c [N];

  poly_mult #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int unsigned v [N]);
    for (int k = 0; k < NP / 2; k++) begin
      int unsigned lo, hi;
      lo = v[2*k];
      hi = (2*k + 1 < N) ? v[2*k+1] : 0;
      h_e <= {11'(hi), 11'(lo)}; sipo_shift <= 1;
      @(posedge clk);
    end
    sipo_shift <= 0;
    @(posedge clk);
  endtask

  task automatic mult_ref(input int unsigned v [N], input bit times_f);
    foreach (ref_c[j]) ref_c[j] = 0;
    for (int i = 0; i < 2*D; i++)
      for (int j = 0; j < N; j++) begin
        int unsigned src;
        src = v[(j + N - idx[i]) % N];
        ref_c[j] = (i < D) ? (ref_c[j] + src) % 2048 : (ref_c[j] + 2048 - src) % 2048;
      end
    if (times_f)
      for (int j = 0; j < N; j++) ref_c[j] = (3 * ref_c[j] + v[j]) % 2048;
  endtask

  task automatic run_steps(input bit times_f);
    int cyc;
    for (int i = 0; i < 2*D; i++) begin
      step_valid <= 1; step_idx <= 11'(idx[i]); step_neg <= (i >= D); step_first <= (i == 0);
      @(posedge clk);
    end
    if (times_f) begin
      step_idx <= '0; step_neg <= 0; step_first <= 0; step_x3 <= 1; @(posedge clk);
      step_x3 <= 0; @(posedge clk);
    end
    step_valid <= 0; step_first <= 0; step_neg <= 0;
    cyc = 0;
    @(negedge clk);
    while (busy) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 1) begin failures++; $display("pipeline tail %0d", cyc); end
  endtask

  task automatic compare(input string what);
    int bad;
    bad = 0;
    for (int j = 0; j < N; j++) if (int'(sum[j]) != ref_c[j]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("%s: %0d coefficients wrong", what, bad); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (a[j]) a[j] = $urandom % 2048;
    load(a);
    checks++;
    begin
      int bad;
      bad = 0;
      for (int j = 0; j < N; j++) if (int'(a_par[j]) != a[j]) bad++;
      if (bad) begin failures++; $display("SIPO load wrong at %0d", bad); end
    end
    for (int t = 0; t < 3; t++) begin
      foreach (idx[i]) idx[i] = (t == 0 && i < 4) ? (i == 0 ? 0 : (i == 1 ? N-1 : i)) : $urandom % N;
      run_steps(0);
      mult_ref(a, 0);
      compare("r*h");
    end
    // swap: a goes to the PISO, a new polynomial is loaded, f*e, swap back
    swap <= 1; @(posedge clk); swap <= 0; @(posedge clk);
    foreach (a2[j]) a2[j] = $urandom % 2048;
    load(a2);
    foreach (idx[i]) idx[i] = $urandom % N;
    run_steps(1);
    mult_ref(a2, 1);
    compare("f*e");
    swap <= 1; @(posedge clk); swap <= 0; @(posedge clk);
    checks++;
    begin
      int bad;
      bad = 0;
      for (int j = 0; j < N; j++) if (int'(a_par[j]) != a[j] || int'(b_par[j]) != a2[j]) bad++;
      if (bad) begin failures++; $display("swap wrong at %0d", bad); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
