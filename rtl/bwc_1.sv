// bwc_1: Bus Width Converter 1 of the BPGM (Blinding Polynomial Generation Method).
// It turns the 32-bit words of SHA-256 output into coefficient indices of r. Words are read
// from the input FIFO into a PISO that gives 16 bits at a time; a bit buffer of up to 28 bits
// (the 15 leftover bits plus a new half-word, as in the document's datapath) delivers c=13-bit
// chunks, most significant bit of the hash output first. Each chunk is an unsigned integer: it is
// discarded if >= CTHR = 2^c - (2^c mod N), otherwise its value mod N is the index. A
// dual-port RAM (64 x 32 bits, one bit per possible index) marks indices already produced, so
// a repeated index is discarded too; port B clears the RAM in 64 cycles after `start`.
// Accepted indices go to the output FIFO, read by the caller with `fifo_read`.
// Timing: one chunk or one half-word per cycle, so a 256-bit hash output takes about 36 cycles;
// an index appears in the output FIFO 2 cycles after its chunk is formed. `idle` is high when
// every input bit that forms a whole chunk has been processed.
// From the document: chunk width, threshold, mod-N table, duplicate RAM with clearing port,
// 16-bit PISO. This design's choices: the buffer shift rule, MSB-first bit order, dropping an
// index when the output FIFO is full (it holds 64 entries, far above what the release
// schedule leaves in it).
module bwc_1 #(
  parameter int unsigned N     = ntru_pkg::N_DEF,
  parameter int unsigned CBITS = ntru_pkg::CBITS,
  parameter int unsigned CTHR  = (1 << CBITS) - ((1 << CBITS) % N),
  parameter int unsigned FDEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,          // clear RAM, buffers and output FIFO
  input  logic [31:0] infifo_dout,
  input  logic        infifo_empty,
  output logic        infifo_read,
  input  logic        fifo_read,
  output logic [10:0] fifo_dout,
  output logic        fifo_empty,
  output logic [$clog2(FDEPTH):0] fifo_count,
  output logic        idle
);
  // ---------------- RAM clearing (port B) ----------------
  logic [31:0] ram [64];
  logic        clearing;
  logic [5:0]  init_counter;

  // ---------------- PISO 32 -> 16 ----------------
  logic [31:0] piso;
  logic [1:0]  halves;
  logic [27:0] bbuf;
  logic [4:0]  bcnt;
  logic        take_chunk, take_half, load_piso;

  assign take_chunk  = !clearing && (bcnt >= 5'(CBITS));
  assign take_half   = !clearing && !take_chunk && (halves != 0);
  assign load_piso   = !clearing && (halves == 0 || (halves == 2'd1 && take_half)) && !infifo_empty;
  assign infifo_read = load_piso;

  logic [CBITS-1:0] chunk;
  assign chunk = CBITS'(bbuf >> (bcnt - 5'(CBITS)));

  // ---------------- stage 1: threshold and mod N ----------------
  logic        v1, lt1;
  logic [10:0] idx1;

  // ---------------- stage 2: duplicate check ----------------
  logic dup, accept;
  assign dup    = ram[idx1[10:5]][idx1[4:0]];
  assign accept = v1 && lt1 && !dup;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b0; init_counter <= '0;
      piso <= '0; halves <= '0; bbuf <= '0; bcnt <= '0;
      v1 <= 1'b0; lt1 <= 1'b0; idx1 <= '0;
    end else if (start) begin
      clearing <= 1'b1; init_counter <= '0;
      halves <= '0; bcnt <= '0; v1 <= 1'b0;
    end else begin
      if (clearing) begin
        init_counter <= init_counter + 6'd1;
        if (init_counter == 6'd63) clearing <= 1'b0;
      end
      // bit buffer
      if (take_chunk)     bcnt <= bcnt - 5'(CBITS);
      else if (take_half) begin
        bbuf <= {bbuf[11:0], piso[31:16]};
        bcnt <= bcnt + 5'd16;
      end
      // PISO
      if (load_piso) begin
        piso <= infifo_dout; halves <= 2'd2;
      end else if (take_half) begin
        piso <= {piso[15:0], 16'h0}; halves <= halves - 2'd1;
      end
      // stage 1
      v1   <= take_chunk;
      lt1  <= (32'(chunk) < CTHR);
      idx1 <= 11'(32'(chunk) % N);
    end
  end

  // RAM: port A sets the bit of an accepted index, port B clears a word
  always_ff @(posedge clk) begin
    if (clearing) ram[init_counter] <= 32'h0;
    else if (accept) ram[idx1[10:5]][idx1[4:0]] <= 1'b1;
  end

  sync_fifo #(.W(11), .DEPTH(FDEPTH)) u_out (
    .clk, .rst_n, .clr(start), .wr(accept), .din(idx1), .rd(fifo_read),
    .dout(fifo_dout), .empty(fifo_empty), .full(), .count(fifo_count));

  assign idle = !clearing && !start && halves == 0 && bcnt < 5'(CBITS) && !v1 && infifo_empty;
endmodule
