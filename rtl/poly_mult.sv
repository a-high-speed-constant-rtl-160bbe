// poly_mult: multiplier in Z_q[X]/(X^N - 1) of a dense polynomial a (N coefficients of QB=11
// bits) by a sparse ternary polynomial b given by the positions of its +1 and -1 coefficients.
// For each position b_i it adds (c0=0) or subtracts (c0=1) the whole vector a rotated by b_i
// places, c_j += a_{(j - b_i) mod N}, in N parallel lanes: one index per clock cycle.
// Subtraction is done as addition of the complemented rotated value with carry-in 1.
//
// Storage: `SIPO w/PI` holds a (h, or the ciphertext e during decryption); it is loaded two
// coefficients per cycle through `h_e` (low half = lower index, first pair = coefficients 0,1)
// and can exchange its contents in one cycle with the neighbouring `PISO w/PO` (`swap`), which
// is how h is parked while e is multiplied and brought back afterwards. The accumulator lanes
// form the result register `sum`.
//
// Steps (`step_valid`): `step_first` starts a new product (accumulator input forced to 0),
// `step_neg` selects subtraction, `step_x3` replaces the rotated operand by sum<<1 so that the
// lane computes 3*sum (used for f*e = e + 3*(F*e) with f = 1 + 3F, followed by one step adding
// a with index 0). Timing: the rotator output is registered, so a step's result is in `sum`
// two cycles after it is issued; steps can be issued every cycle. `busy` is high while steps
// are in flight. The rotator is a logarithmic barrel rotator. The document's design has a
// five-stage pipeline for clock speed; this one has two stages. Lane structure, REP/XOR
// complement, carry-in and the <<1 path follow the document; the x3 use of the <<1 path is
// this design's reading of it.
module poly_mult
  import ntru_pkg::*;
#(
  parameter int unsigned N = N_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sipo_shift,
  input  logic [2*QB-1:0]       h_e,
  input  logic                  swap,
  input  logic                  step_valid,
  input  logic [IDXW-1:0]       step_idx,
  input  logic                  step_neg,
  input  logic                  step_first,
  input  logic                  step_x3,
  output logic [N-1:0][QB-1:0]  a_par,     // SIPO w/PI contents
  output logic [N-1:0][QB-1:0]  b_par,     // PISO w/PO contents
  output logic [N-1:0][QB-1:0]  sum,
  output logic                  busy
);
  localparam int unsigned NP = N + (N % 2);
  localparam int unsigned RS = $clog2(N);

  logic [NP-1:0][QB-1:0] sipo;
  logic [N-1:0][QB-1:0]  piso;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sipo <= '0; piso <= '0;
    end else if (swap) begin
      for (int j = 0; j < N; j++) begin
        sipo[j] <= piso[j];
        piso[j] <= sipo[j];
      end
    end else if (sipo_shift) begin
      sipo <= {h_e, sipo[NP-1:2]};
    end
  end

  always_comb for (int j = 0; j < N; j++) a_par[j] = sipo[j];
  assign b_par = piso;

  // ---------------- rotator ----------------
  for (genvar k = 0; k < RS; k++) begin : g_rot
    localparam int unsigned SH = (1 << k) % N;
    logic [N-1:0][QB-1:0] r_in, r_out;
    if (k == 0) begin : g_first
      assign r_in = a_par;
    end else begin : g_next
      assign r_in = g_rot[k-1].r_out;
    end
    always_comb begin
      for (int j = 0; j < N; j++)
        r_out[j] = step_idx[k] ? r_in[(j + N - SH) % N] : r_in[j];
    end
  end

  // ---------------- pipeline register ----------------
  logic                 v1, neg1, first1, x31;
  logic [N-1:0][QB-1:0] ro;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; neg1 <= 1'b0; first1 <= 1'b0; x31 <= 1'b0; ro <= '0;
    end else begin
      v1 <= step_valid; neg1 <= step_neg; first1 <= step_first; x31 <= step_x3;
      if (step_valid) ro <= g_rot[RS-1].r_out;
    end
  end

  // ---------------- N accumulate lanes ----------------
  logic [QB-1:0] c0v;
  assign c0v = {QB{neg1}};                   // REP: c0 replicated QB times
  for (genvar j = 0; j < N; j++) begin : g_lane
    logic [QB-1:0] opnd, t;
    assign opnd = x31 ? {sum[j][QB-2:0], 1'b0} : (ro[j] ^ c0v);
    assign t    = first1 ? '0 : sum[j];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  sum[j] <= '0;
      else if (v1) sum[j] <= opnd + t + QB'(neg1);
    end
  end

  assign busy = v1;
endmodule
