// check2: verifies the format of the decrypted message block cMbin. The message field holds
// MAXMSG bytes (byte 0 in the most significant bits of `mfield`); the decrypted length cOctL
// must not exceed MAXMSG, and every byte from index cOctL on (the padding p0) must be zero.
// `ok` is 0 otherwise. Combinational.
module check2
  import ntru_pkg::*;
#(
  parameter int unsigned MAXMSG = MAXMSG_DEF
) (
  input  logic [8*MAXMSG-1:0] mfield,
  input  logic [7:0]          coctl,
  output logic                ok
);
  always_comb begin
    ok = (int'(coctl) <= MAXMSG);
    for (int k = 0; k < MAXMSG; k++)
      if (k >= int'(coctl) && mfield[8*MAXMSG-1-8*k -: 8] != 8'h00) ok = 1'b0;
  end
endmodule
