// check1: verifies that a ternary polynomial (m' on encryption, ci on decryption) holds at
// least DM0 coefficients equal to 0, to +1 and to -1. `ok` is 0 when any count is short, which
// makes the operation fail. Combinational population counts over N coefficients.
module check1
  import ntru_pkg::*;
#(
  parameter int unsigned N   = N_DEF,
  parameter int unsigned DM0 = DM0_DEF
) (
  input  logic [N-1:0][1:0] t,
  output logic              ok
);
  logic [IDXW:0] n0, n1, n2;
  always_comb begin
    n0 = '0; n1 = '0; n2 = '0;
    for (int j = 0; j < N; j++) begin
      n0 += (IDXW+1)'(t[j] == 2'd0);
      n1 += (IDXW+1)'(t[j] == 2'd1);
      n2 += (IDXW+1)'(t[j] == 2'd2);
    end
    ok = (int'(n0) >= DM0) && (int'(n1) >= DM0) && (int'(n2) >= DM0);
  end
endmodule
