// modified_sha2: iterative SHA-256 compression function, one round per clock, 65 cycles per
// 512-bit block, extended with a register that can save ("backup") and reload the chaining
// value. The save/restore lets a caller hash sData||C for many counters C while processing the
// blocks that hold only sData once.
//
// Interface: pulse `start` with `block` (512 bits, big-endian words, word 0 in bits 511:480)
// and `sel_init` (0: continue from the current chaining value, 1: load the SHA-256 IV,
// 2: load the saved chaining value). If `en_backup` is high with `start`, the chaining value
// after this block is also written to the backup register. `done` pulses 64 cycles after
// `start` (the start cycle plus 64 rounds: a new block can start every 65 cycles); `digest`
// then holds the chaining value (H0 in bits 255:224). `busy` is high between.
// The SHA-256 function follows FIPS 180-4; the exact handshake is this design's choice.
module modified_sha2 (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [1:0]   sel_init,
  input  logic         en_backup,
  input  logic [511:0] block,
  output logic         busy,
  output logic         done,
  output logic [255:0] digest
);
  localparam logic [31:0] K [64] = '{
    32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
    32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
    32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
    32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
    32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
    32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
    32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
    32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2};
  localparam logic [255:0] IV = {32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
                                 32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};

  logic [31:0]  w [16];
  logic [31:0]  a, b, c, d, e, f, g, h;
  logic [255:0] hreg, backup;
  logic [6:0]   rnd;          // round 0..63; round 63 also updates H
  logic         save;

  function automatic logic [31:0] rotr(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  logic [255:0] hsrc;
  always_comb begin
    unique case (sel_init)
      2'd1:    hsrc = IV;
      2'd2:    hsrc = backup;
      default: hsrc = hreg;
    endcase
  end

  logic [31:0] s0, s1, ch, maj, t1, t2, wnext;
  always_comb begin
    s1    = rotr(e, 6) ^ rotr(e, 11) ^ rotr(e, 25);
    ch    = (e & f) ^ (~e & g);
    t1    = h + s1 + ch + K[rnd[5:0]] + w[0];
    s0    = rotr(a, 2) ^ rotr(a, 13) ^ rotr(a, 22);
    maj   = (a & b) ^ (a & c) ^ (b & c);
    t2    = s0 + maj;
    wnext = (rotr(w[14], 17) ^ rotr(w[14], 19) ^ (w[14] >> 10)) + w[9] +
            (rotr(w[1], 7) ^ rotr(w[1], 18) ^ (w[1] >> 3)) + w[0];
  end

  // chaining value after the last round: working variables of round 63 added to H
  logic [255:0] hnew;
  logic [31:0]  na, ne;
  assign na   = t1 + t2;
  assign ne   = d + t1;
  assign hnew = {hreg[255:224] + na, hreg[223:192] + a, hreg[191:160] + b, hreg[159:128] + c,
                 hreg[127:96]  + ne, hreg[95:64]    + e, hreg[63:32]    + f, hreg[31:0]     + g};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; rnd <= '0; save <= 1'b0;
      hreg <= IV; backup <= IV;
      {a, b, c, d, e, f, g, h} <= '0;
      for (int i = 0; i < 16; i++) w[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        rnd  <= '0;
        save <= en_backup;
        hreg <= hsrc;
        {a, b, c, d, e, f, g, h} <= hsrc;
        for (int i = 0; i < 16; i++) w[i] <= block[511 - 32*i -: 32];
      end else if (busy) begin
        if (rnd == 7'd63) begin
          hreg <= hnew;
          if (save) backup <= hnew;
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          {a, b, c, d, e, f, g, h} <= {t1 + t2, a, b, c, d + t1, e, f, g};
          for (int i = 0; i < 15; i++) w[i] <= w[i+1];
          w[15] <= wnext;
          rnd <= rnd + 7'd1;
        end
      end
    end
  end

  assign digest = hreg;
endmodule
