// check3: compares the recomputed polynomial cR' = cr * h with cR = e - ci, coefficient by
// coefficient; `ok` is 1 only if all N coefficients are equal. It also reports the number of
// differing coefficients, which a testbench or a debug port can read. Combinational.
module check3
  import ntru_pkg::*;
#(
  parameter int unsigned N = N_DEF
) (
  input  logic [N-1:0][QB-1:0] a,
  input  logic [N-1:0][QB-1:0] b,
  output logic                 ok,
  output logic [IDXW:0]        ndiff
);
  always_comb begin
    ndiff = '0;
    for (int j = 0; j < N; j++) ndiff += (IDXW+1)'(a[j] != b[j]);
    ok = (ndiff == 0);
  end
endmodule
