// tb_b2t: random Mbin strings; each coefficient pair is checked against the IEEE 1363.1
// bit-to-trit table written out as constants, and the coefficients past the string are 0.
module tb_b2t;
  localparam int N = 1499, MB = 2240, NG = (MB + 2) / 3;
  logic [MB-1:0] bits;
  logic [N-1:0][1:0] trits;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  b2t #(.N(N), .MB(MB)) dut (.*);
  // table: 3-bit value -> (first trit, second trit), 2 standing for -1
  localparam logic [1:0] T0 [8] = '{0, 0, 2'd0, 1, 1, 1, 2, 2};
  localparam logic [1:0] T1 [8] = '{0, 1, 2'd2, 0, 1, 2, 0, 1};
  initial begin
    logic [3*NG-1:0] pb;
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < MB; i += 32) bits[i +: 32] = $urandom;
      if (r == 0) bits = '0;
      if (r == 1) bits = '1;
      #1;
      pb = {bits, {(3*NG-MB){1'b0}}};
      for (int g = 0; g < NG; g++) begin
        logic [2:0] v;
        v = pb[3*NG-1-3*g -: 3];
        checks++;
        if (trits[2*g] !== T0[v] || trits[2*g+1] !== T1[v]) begin
          failures++;
          if (failures < 5) $display("group %0d v=%0d got %0d %0d", g, v, trits[2*g], trits[2*g+1]);
        end
      end
      for (int j = 2*NG; j < N; j++) begin
        checks++;
        if (trits[j] !== 2'd0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
