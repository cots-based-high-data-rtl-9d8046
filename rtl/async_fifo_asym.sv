// async_fifo_asym: dual-clock burst buffer with a wide write port and a
// half-width read port.
//
// Default size 128 KiB: 8192 words of 128 bits, written at up to 100 MHz by
// the acquisition side and read as 16384 words of 64 bits at 250 MHz by the
// DMA side. Each stored word is read as two halves, bits [63:0] first, so the
// host sees channels 0-3 of a sample set before channels 4-7.
//
// Pointers are kept in binary and passed between the clock domains in Gray
// code through two flip-flops. The write pointer counts 128-bit words and
// the read pointer 64-bit halves; a stored word is released to the writer
// only after both of its halves have been read. full is seen in the write
// domain, empty (no complete word left to read) in the read domain; both are
// pessimistic by the synchroniser delay, as usual.
//
// Read timing: rd_en with !empty reads the next half; rd_data is valid, with
// rd_valid high, on the following cycle. A write with full high, or a read
// with empty high, is ignored.
//
// Size, port widths and clock rates are those of the original board; the
// pointer scheme, read order and read latency are this design's choices.
module async_fifo_asym #(
  parameter int unsigned WR_W       = 128,
  parameter int unsigned RD_W       = 64,
  parameter int unsigned FIFO_BYTES = 128 * 1024
) (
  input  logic              wr_clk,
  input  logic              wr_rst_n,
  input  logic              wr_en,
  input  logic [WR_W-1:0]   wr_data,
  output logic              full,
  input  logic              rd_clk,
  input  logic              rd_rst_n,
  input  logic              rd_en,
  output logic [RD_W-1:0]   rd_data,
  output logic              rd_valid,
  output logic              empty
);
  localparam int unsigned DEPTH = FIFO_BYTES / (WR_W / 8);   // write words
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned RATIO = WR_W / RD_W;               // 2
  localparam int unsigned SW_   = $clog2(RATIO);             // half select bits

  logic [WR_W-1:0] mem [DEPTH];

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ------------------------------------------------------------ write side
  logic [AW:0] wptr, wptr_gray, rq_gray_m, rq_gray;
  logic [AW+SW_:0] rptr;           // read pointer in halves
  logic [AW:0] rword_gray;          // read pointer in words, Gray coded

  wire [AW:0] rq_bin = gray2bin(rq_gray);
  assign full = (wptr[AW] != rq_bin[AW]) && (wptr[AW-1:0] == rq_bin[AW-1:0]);

  always_ff @(posedge wr_clk)
    if (wr_en && !full) mem[wptr[AW-1:0]] <= wr_data;

  always_ff @(posedge wr_clk or negedge wr_rst_n)
    if (!wr_rst_n) begin
      wptr      <= '0;
      wptr_gray <= '0;
      rq_gray_m <= '0;
      rq_gray   <= '0;
    end else begin
      rq_gray_m <= rword_gray;
      rq_gray   <= rq_gray_m;
      if (wr_en && !full) begin
        wptr      <= wptr + 1'b1;
        wptr_gray <= bin2gray(wptr + 1'b1);
      end
    end

  // ------------------------------------------------------------- read side
  logic [AW:0] wq_gray_m, wq_gray;
  wire  [AW:0] wq_bin = gray2bin(wq_gray);
  wire  [AW:0] rword  = rptr[AW+SW_:SW_];
  assign empty = (rword == wq_bin);

  logic [WR_W-1:0] rd_word;
  logic [SW_-1:0]  rd_sel;
  wire             do_rd = rd_en && !empty;
  wire [AW+SW_:0]  rptr_nxt = rptr + 1'b1;

  always_ff @(posedge rd_clk)
    if (do_rd) rd_word <= mem[rword[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n)
    if (!rd_rst_n) begin
      rptr       <= '0;
      rword_gray <= '0;
      wq_gray_m  <= '0;
      wq_gray    <= '0;
      rd_sel     <= '0;
      rd_valid   <= 1'b0;
    end else begin
      wq_gray_m <= wptr_gray;
      wq_gray   <= wq_gray_m;
      rd_valid  <= do_rd;
      if (do_rd) begin
        rd_sel     <= rptr[SW_-1:0];
        rptr       <= rptr_nxt;
        rword_gray <= bin2gray(rptr_nxt[AW+SW_:SW_]);
      end
    end

  assign rd_data = rd_word[rd_sel*RD_W +: RD_W];

  initial assert (WR_W == RATIO * RD_W && RATIO >= 2 && (1 << AW) == DEPTH)
    else $error("unsupported FIFO geometry");
endmodule
