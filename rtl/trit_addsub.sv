// trit_addsub: coefficient-wise addition (sub=0) or subtraction (sub=1) of two ternary
// polynomials modulo 3. Coefficients are residues 0,1,2 (2 = -1). Used for m' = Mtrin + mask
// on encryption and cMtrin = ci - mask on decryption. Purely combinational, all N
// coefficients in parallel.
module trit_addsub
  import ntru_pkg::*;
#(
  parameter int unsigned N = N_DEF
) (
  input  logic              sub,
  input  logic [N-1:0][1:0] a,
  input  logic [N-1:0][1:0] b,
  output logic [N-1:0][1:0] y
);
  always_comb begin
    for (int j = 0; j < N; j++) begin
      logic [2:0] s;
      s = sub ? 3'(a[j]) + 3'd3 - 3'(b[j]) : 3'(a[j]) + 3'(b[j]);
      y[j] = (s >= 3'd3) ? 2'(s - 3'd3) : s[1:0];
    end
  end
endmodule
