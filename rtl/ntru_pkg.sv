// ntru_pkg: parameter set and shared helpers of the NTRUEncrypt SVES datapath.
// The defaults are the ees1499ep1 parameter set (N=1499, dr=df=dm0=79, db=pkLen=256,
// maxMsgLenBytes=247, q=2048, p=3, c=13). A ternary coefficient is stored in two bits as its
// residue mod 3: 2'd0 = 0, 2'd1 = +1, 2'd2 = -1 (this encoding is a choice of this design).
// The OID value is not given with the parameter set; the constant below is a placeholder.
package ntru_pkg;
  localparam int unsigned N_DEF       = 1499;  // ring dimension
  localparam int unsigned DR_DEF      = 79;    // number of +1s (and of -1s) in r
  localparam int unsigned DF_DEF      = 79;    // number of +1s (and of -1s) in F
  localparam int unsigned DB_DEF      = 256;   // bits of random data b
  localparam int unsigned DM0_DEF     = 79;    // Check 1 minimum
  localparam int unsigned MAXMSG_DEF  = 247;   // maxMsgLenBytes
  localparam int unsigned PKLEN_DEF   = 256;   // bits of h in sData
  localparam int unsigned QB          = 11;    // log2 q
  localparam int unsigned CBITS       = 13;    // index generation constant c
  localparam int unsigned IDXW        = 11;    // bits of a coefficient index
  localparam logic [23:0] OID_DEF     = 24'h000605;

  // Cumulative minimum number of BPGM indices released after each hash output (Table IV).
  localparam int unsigned BPGM_HASHES_DEF = 10;
  typedef int unsigned rel_tab_t [16];
  localparam rel_tab_t BPGM_MIN_DEF = '{14, 30, 47, 62, 79, 94, 110, 126, 142, 158,
                                        0, 0, 0, 0, 0, 0};
  // MGF: 64 ten-bit chunks released after hash outputs 3,5,7,9,11 (Table V).
  localparam int unsigned MGF_HASHES_DEF = 11;

  typedef logic [1:0]    trit_t;
  typedef logic [QB-1:0] coef_t;

  // Residue of a 3-bit number split in two base-3 digits (B2T table).
  function automatic logic [3:0] b2t3(input logic [2:0] v);
    logic [1:0] hi, lo;
    hi = 2'(v / 3);
    lo = 2'(v % 3);
    return {hi, lo};
  endfunction
endpackage
