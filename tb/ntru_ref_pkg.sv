// ntru_ref_pkg: software reference models used by the testbenches: SHA-256 on a byte string,
// the BPGM index stream and the MGF trit stream with the same release schedule as the
// hardware, ring multiplication and inversion in Z_2048[X]/(X^N - 1) for making key pairs.
// Written from the algorithm definitions, independently of the RTL.
package ntru_ref_pkg;
  typedef byte unsigned bytes_t[$];
  typedef int unsigned  ints_t[$];

  function automatic logic [31:0] rr(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic logic [255:0] sha256(input bytes_t msg);
    logic [31:0] k [64] = '{
      32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
      32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
      32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
      32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
      32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
      32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
      32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
      32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2};
    logic [31:0] h [8] = '{32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
                           32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};
    bytes_t m;
    longint unsigned bitlen;
    logic [31:0] w [64];
    logic [31:0] a, b, c, d, e, f, g, hh, t1, t2;
    logic [255:0] r;
    m = msg;
    bitlen = 64'(msg.size()) * 8;
    m.push_back(8'h80);
    while (m.size() % 64 != 56) m.push_back(8'h00);
    for (int i = 7; i >= 0; i--) m.push_back(8'(bitlen >> (8*i)));
    for (int blk = 0; blk < m.size() / 64; blk++) begin
      for (int t = 0; t < 16; t++)
        w[t] = {m[64*blk+4*t], m[64*blk+4*t+1], m[64*blk+4*t+2], m[64*blk+4*t+3]};
      for (int t = 16; t < 64; t++)
        w[t] = (rr(w[t-2], 17) ^ rr(w[t-2], 19) ^ (w[t-2] >> 10)) + w[t-7] +
               (rr(w[t-15], 7) ^ rr(w[t-15], 18) ^ (w[t-15] >> 3)) + w[t-16];
      {a, b, c, d, e, f, g, hh} = {h[0], h[1], h[2], h[3], h[4], h[5], h[6], h[7]};
      for (int t = 0; t < 64; t++) begin
        t1 = hh + (rr(e, 6) ^ rr(e, 11) ^ rr(e, 25)) + ((e & f) ^ (~e & g)) + k[t] + w[t];
        t2 = (rr(a, 2) ^ rr(a, 13) ^ rr(a, 22)) + ((a & b) ^ (a & c) ^ (b & c));
        hh = g; g = f; f = e; e = d + t1; d = c; c = b; b = a; a = t1 + t2;
      end
      h[0] += a; h[1] += b; h[2] += c; h[3] += d; h[4] += e; h[5] += f; h[6] += g; h[7] += hh;
    end
    for (int i = 0; i < 8; i++) r[255 - 32*i -: 32] = h[i];
    return r;
  endfunction

  // hash(seed || C) as a byte string, C big-endian 32 bits
  function automatic logic [255:0] hash_ctr(input bytes_t seed, input int unsigned ctr);
    bytes_t m;
    m = seed;
    for (int i = 3; i >= 0; i--) m.push_back(8'(ctr >> (8*i)));
    return sha256(m);
  endfunction

  // BPGM: returns the released indices, or an empty queue if a batch is short.
  function automatic ints_t bpgm(input bytes_t seed, input int unsigned n,
                                 input int unsigned hashes, input int unsigned mins[16]);
    ints_t fifo, out;
    bit used [2048];
    int unsigned cthr, acc, nacc, prev;
    logic [255:0] d;
    cthr = 8192 - (8192 % n);
    foreach (used[i]) used[i] = 0;
    acc = 0; nacc = 0; prev = 0;
    for (int hsh = 0; hsh < hashes; hsh++) begin
      d = hash_ctr(seed, hsh);
      for (int i = 255; i >= 0; i--) begin
        acc = (acc << 1) | int'(d[i]);
        nacc++;
        if (nacc == 13) begin
          if (acc < cthr && !used[acc % n]) begin
            used[acc % n] = 1;
            fifo.push_back(acc % n);
          end
          acc = 0; nacc = 0;
        end
      end
      if (fifo.size() < mins[hsh] - prev) begin
        out.delete();
        return out;
      end
      for (int i = 0; i < int'(mins[hsh] - prev); i++) out.push_back(fifo.pop_front());
      prev = mins[hsh];
    end
    return out;
  endfunction

  // MGF: returns the released trits (0,1,2), 320 per release after hashes 3,5,7,...
  function automatic ints_t mgf(input bytes_t seed, input int unsigned hashes);
    ints_t chunks, out;
    logic [255:0] d;
    int unsigned v;
    for (int hsh = 0; hsh < hashes; hsh++) begin
      d = hash_ctr(seed, hsh);
      for (int i = 0; i < 32; i++) begin
        v = d[255 - 8*i -: 8];
        if (v < 243) chunks.push_back(v);
      end
      if (hsh >= 2 && hsh % 2 == 0) begin
        if (chunks.size() < 64) begin
          out.delete();
          return out;
        end
        for (int c = 0; c < 64; c++) begin
          v = chunks.pop_front();
          for (int t = 0; t < 5; t++) begin
            out.push_back(v % 3);
            v = v / 3;
          end
        end
      end
    end
    return out;
  endfunction

  // ---------------- ring arithmetic for key generation ----------------
  typedef int unsigned poly_t[];

  // c = a * b in Z_q[X]/(X^n - 1), q = 2048
  function automatic poly_t ring_mul(input poly_t a, input poly_t b, input int n);
    poly_t c;
    c = new[n];
    foreach (c[i]) c[i] = 0;
    for (int i = 0; i < n; i++) begin
      if (a[i] == 0) continue;
      for (int j = 0; j < n; j++) c[(i + j) % n] = (c[(i + j) % n] + a[i] * b[j]) % 2048;
    end
    return c;
  endfunction

  // inverse of f in Z_2048[X]/(X^n - 1): almost-inverse algorithm mod 2, then Newton lifting.
  // Returns an empty array if f is not invertible mod 2.
  function automatic poly_t ring_inv(input poly_t f, input int n);
    bit fb[], gb[], bb[], cb[];
    int k, df, dg;
    poly_t b, t;
    fb = new[n + 1]; gb = new[n + 1]; bb = new[n + 1]; cb = new[n + 1];
    foreach (fb[i]) begin fb[i] = 0; gb[i] = 0; bb[i] = 0; cb[i] = 0; end
    for (int i = 0; i < n; i++) fb[i] = f[i] % 2;
    gb[0] = 1; gb[n] = 1;
    bb[0] = 1;
    k = 0;
    forever begin
      int nz;
      nz = 0;
      foreach (fb[i]) if (fb[i]) nz = 1;
      if (!nz) begin b = new[0]; return b; end
      while (!fb[0]) begin
        for (int i = 0; i < n; i++) fb[i] = fb[i+1];
        fb[n] = 0;
        for (int i = n; i > 0; i--) cb[i] = cb[i-1];
        cb[0] = 0;
        k++;
      end
      df = 0; dg = 0;
      foreach (fb[i]) if (fb[i]) df = i;
      foreach (gb[i]) if (gb[i]) dg = i;
      if (df == 0) break;
      if (df < dg) begin
        bit tmp[];
        tmp = fb; fb = gb; gb = tmp;
        tmp = bb; bb = cb; cb = tmp;
      end
      foreach (fb[i]) begin fb[i] ^= gb[i]; bb[i] ^= cb[i]; end
    end
    // inverse mod 2 is X^(n-k) * b
    b = new[n];
    foreach (b[i]) b[i] = 0;
    for (int i = 0; i <= n; i++) if (bb[i]) b[(i + n - (k % n)) % n] ^= 1;
    // Newton: b <- b * (2 - f*b), precision 2 -> 4 -> 16 -> 256 -> 65536
    for (int it = 0; it < 4; it++) begin
      t = ring_mul(f, b, n);
      foreach (t[i]) t[i] = (2048 - t[i]) % 2048;
      t[0] = (t[0] + 2) % 2048;
      b = ring_mul(t, b, n);
    end
    return b;
  endfunction
endpackage
