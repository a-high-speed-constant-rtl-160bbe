// poly_addsub_q: adds (sub=0) or subtracts (sub=1) a ternary polynomial (residues 0,1,2 with
// 2 = -1) to/from a polynomial with big coefficients modulo q = 2^QB. Encryption uses it for
// the ciphertext e = R + m', decryption for cR = e - ci. Combinational, N coefficients in
// parallel; the mod q reduction is the natural wrap of an 11-bit adder.
module poly_addsub_q
  import ntru_pkg::*;
#(
  parameter int unsigned N = N_DEF
) (
  input  logic                 sub,
  input  logic [N-1:0][QB-1:0] a,
  input  logic [N-1:0][1:0]    t,
  output logic [N-1:0][QB-1:0] y
);
  always_comb begin
    for (int j = 0; j < N; j++) begin
      logic [QB-1:0] s;                           // signed value of the trit, mod q
      s = (t[j] == 2'd1) ? QB'(1) : (t[j] == 2'd2) ? '1 : '0;
      y[j] = sub ? a[j] - s : a[j] + s;
    end
  end
endmodule
