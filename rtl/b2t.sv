// b2t: bit-to-trit conversion. The binary string Mbin (MB bits, first bit in the MSB of
// `bits`) is cut into groups of three bits, the last group padded with zeros. Group g, read as
// a number v in 0..7 (its first bit most significant), becomes the two ternary coefficients
// 2g = v/3 and 2g+1 = v mod 3 (digit 2 standing for -1): 000->(0,0), 001->(0,1),
// 010->(0,-1), 011->(1,0), 100->(1,1), 101->(1,-1), 110->(-1,0), 111->(-1,1).
// Coefficients above 2*ceil(MB/3)-1 are 0. Purely combinational (one cycle in the datapath).
// The table is the one of IEEE 1363.1; the bit and coefficient order is this design's choice.
module b2t
  import ntru_pkg::*;
#(
  parameter int unsigned N  = N_DEF,
  parameter int unsigned MB = DB_DEF + 8 + 8*MAXMSG_DEF
) (
  input  logic [MB-1:0]        bits,
  output logic [N-1:0][1:0]    trits
);
  localparam int unsigned NG = (MB + 2) / 3;
  logic [3*NG-1:0] padded;
  assign padded = {bits, {(3*NG-MB){1'b0}}};

  always_comb begin
    trits = '0;
    for (int g = 0; g < NG; g++) begin
      logic [3:0] t;
      t = b2t3(padded[3*NG-1-3*g -: 3]);
      if (2*g < N)     trits[2*g]   = t[3:2];
      if (2*g + 1 < N) trits[2*g+1] = t[1:0];
    end
  end
endmodule
