// bwc_2: Bus Width Converter 2 of the MGF (Mask Generation Function).
// 32-bit words of SHA-256 output enter a PISO that shifts out one byte per cycle, first byte
// first. A byte >= 243 (= 3^5) is discarded; a smaller one is converted by the O2T table into
// five base-3 digits, least significant digit first, each digit in two bits (its residue mod 3,
// 2 meaning -1), giving a 10-bit chunk that is written to a FIFO. The O2T table is computed
// here from its definition rather than stored.
// Release: a pulse on `release` moves 64 chunks (640 bits) from the FIFO into a SIPO, one per
// cycle, then presents them as five 128-bit words on `output_data` (bits 639..512 of the SIPO
// first) with a valid/ready handshake. If fewer than 64 chunks are stored at the release, `err`
// pulses and nothing is released. Mask trit k of one release is in word k/64, bits
// [127-2*(k%64) -: 2]. The 64-chunk release granularity follows the document's schedule;
// the FIFO depth and handshake are this design's choices.
module bwc_2 #(
  parameter int unsigned FDEPTH = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [31:0]  infifo_dout,
  input  logic         infifo_empty,
  output logic         infifo_read,
  input  logic         release_i,
  output logic         output_valid,
  input  logic         output_ready,
  output logic [127:0] output_data,
  output logic         err,
  output logic         idle,
  output logic         releasing
);
  function automatic logic [9:0] o2t(input logic [7:0] o);
    logic [9:0] r;
    int unsigned v;
    v = 32'(o);
    for (int i = 0; i < 5; i++) begin
      r[9-2*i -: 2] = 2'(v % 3);
      v = v / 3;
    end
    return r;
  endfunction

  logic [31:0] piso;
  logic [2:0]  bytes;
  logic        load_piso, take_byte, push;
  logic [7:0]  cur;

  assign take_byte   = (bytes != 0);
  assign cur         = piso[31:24];
  assign load_piso   = (bytes == 0 || (bytes == 3'd1)) && !infifo_empty;
  assign infifo_read = load_piso;
  assign push        = take_byte && (cur < 8'd243);

  logic [9:0]  fdout;
  logic        fempty, pop;
  logic [$clog2(FDEPTH):0] fcount;

  sync_fifo #(.W(10), .DEPTH(FDEPTH)) u_fifo (
    .clk, .rst_n, .clr(start), .wr(push), .din(o2t(cur)), .rd(pop),
    .dout(fdout), .empty(fempty), .full(), .count(fcount));

  typedef enum logic [1:0] {R_IDLE, R_FILL, R_OUT} rstate_t;
  rstate_t     rs;
  logic [639:0] sipo;
  logic [6:0]  n_in;
  logic [2:0]  n_out;

  assign pop          = (rs == R_FILL);
  assign output_valid = (rs == R_OUT);
  assign output_data  = sipo[639:512];
  assign releasing    = (rs != R_IDLE);
  assign idle         = (bytes == 0) && infifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      piso <= '0; bytes <= '0; rs <= R_IDLE; sipo <= '0; n_in <= '0; n_out <= '0; err <= 1'b0;
    end else if (start) begin
      bytes <= '0; rs <= R_IDLE; n_in <= '0; n_out <= '0; err <= 1'b0;
    end else begin
      err <= 1'b0;
      if (load_piso) begin
        piso <= infifo_dout; bytes <= 3'd4;
      end else if (take_byte) begin
        piso <= {piso[23:0], 8'h0}; bytes <= bytes - 3'd1;
      end
      unique case (rs)
        R_IDLE: if (release_i) begin
          if (fcount >= 64) begin rs <= R_FILL; n_in <= '0; end
          else err <= 1'b1;
        end
        R_FILL: begin
          sipo <= {sipo[629:0], fdout};
          n_in <= n_in + 7'd1;
          if (n_in == 7'd63) begin rs <= R_OUT; n_out <= '0; end
        end
        R_OUT: if (output_ready) begin
          sipo  <= {sipo[511:0], 128'h0};
          n_out <= n_out + 3'd1;
          if (n_out == 3'd4) rs <= R_IDLE;
        end
        default: rs <= R_IDLE;
      endcase
    end
  end
endmodule
