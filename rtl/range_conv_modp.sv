// range_conv_modp: range conversion and mod p reduction combined. Each coefficient a in
// [0, q-1] is read as the centred value v = a (a < q/2) or a - q (a >= q/2), and v mod 3 is
// returned as a residue 0,1,2 (2 = -1). Since q = 2048 = 2 (mod 3), the residue of a - q is
// that of a + 1. Combinational, N coefficients in parallel.
module range_conv_modp
  import ntru_pkg::*;
#(
  parameter int unsigned N = N_DEF
) (
  input  logic [N-1:0][QB-1:0] a,
  output logic [N-1:0][1:0]    y
);
  always_comb begin
    for (int j = 0; j < N; j++) begin
      logic [1:0] r;
      r = 2'(a[j] % 3);
      if (a[j][QB-1]) r = (r == 2'd2) ? 2'd0 : r + 2'd1;
      y[j] = r;
    end
  end
endmodule
