// tb_check2: message fields with zero padding after cOctL must pass; a single non-zero
// padding byte, or cOctL above 247, must fail. Non-zero bytes before cOctL do not matter.
module tb_check2;
  localparam int MAXMSG = 247;
  logic [8*MAXMSG-1:0] mfield;
  logic [7:0] coctl;
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
  check2 #(.MAXMSG(MAXMSG)) dut (.*);
  initial begin
    for (int r = 0; r < 200; r++) begin
      int len;
      len = $urandom % (MAXMSG + 1);
      mfield = '0;
      for (int k = 0; k < len; k++) mfield[8*MAXMSG-1-8*k -: 8] = 8'($urandom | 1);
      coctl = 8'(len);
      #1;
      checks++;
      if (ok !== 1'b1) begin failures++; $display("len %0d rejected", len); end
      if (len < MAXMSG) begin
        int k;
        k = len + $urandom % (MAXMSG - len);
        mfield[8*MAXMSG-1-8*k -: 8] = 8'(1 << ($urandom % 8));
        #1;
        checks++;
        if (ok !== 1'b0) begin failures++; $display("padding byte %0d accepted", k); end
      end
    end
    mfield = '0; coctl = 8'd248;
    #1;
    checks++;
    if (ok !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
