// t2b: trit-to-bit conversion, the inverse of b2t. Coefficient pairs (2g, 2g+1), each a residue
// mod 3 (2 standing for -1), give v = 3*t(2g) + t(2g+1) in 0..7, written as three bits, most
// significant first, at position 3g of the output string (first bit in the MSB of `bits`).
// The pair (-1,-1) has no 3-bit image: it is converted to 000 and flagged on `bad`.
// Purely combinational. Output length MB bits (Mbin), the padding bits of the last group are
// dropped. Flagging (-1,-1) is this design's choice.
module t2b
  import ntru_pkg::*;
#(
  parameter int unsigned N  = N_DEF,
  parameter int unsigned MB = DB_DEF + 8 + 8*MAXMSG_DEF
) (
  input  logic [N-1:0][1:0] trits,
  output logic [MB-1:0]     bits,
  output logic              bad
);
  localparam int unsigned NG = (MB + 2) / 3;
  logic [3*NG-1:0] full;

  always_comb begin
    full = '0;
    bad  = 1'b0;
    for (int g = 0; g < NG; g++) begin
      logic [3:0] v;
      v = 4'(3 * int'(trits[2*g])) + 4'(trits[2*g+1]);
      if (v > 4'd7) begin
        bad = 1'b1;
        v   = 4'd0;
      end
      full[3*NG-1-3*g -: 3] = v[2:0];
    end
  end
  assign bits = full[3*NG-1 -: MB];
endmodule
