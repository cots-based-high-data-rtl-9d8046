// dma_mgmt: DMA management, the read side of the burst buffer.
//
// Runs on the 250 MHz clock of the DMA core. A start pulse (produced by the
// frame timer a programmed time after the first trigger of a burst) begins
// the upload of one burst: burst_words 64-bit words are read from the FIFO
// and handed to the DMA core over a valid/ready stream, m_last marking the
// final word. Because the start may be placed before the acquisition of the
// burst has ended, the transfer simply waits whenever the FIFO is empty and
// resumes as samples arrive; with data available and m_ready high it moves
// one word per cycle (64 bits x 250 MHz = 2 GB/s, the raw rate of an x8
// PCIe 1.1 link).
//
// The FIFO has one cycle of read latency, so words pass through a four-entry
// output queue and a read is only issued when the queue has room for it and
// for the read already in flight. done pulses on the cycle after the last
// word is accepted. A start pulse while a transfer is running is ignored and
// sets the sticky overrun flag, cleared by clr.
//
// The timed start and the overlap with the acquisition follow the original
// system; the stream interface toward the (bought-in) DMA core, the queue
// and the overrun flag are this design's own.
module dma_mgmt #(
  parameter int unsigned DW = 64,
  parameter int unsigned QD = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   burst_words,
  input  logic          clr,
  // burst buffer read port
  output logic          fifo_rd_en,
  input  logic [DW-1:0] fifo_rd_data,
  input  logic          fifo_rd_valid,
  input  logic          fifo_empty,
  // stream to the DMA core
  output logic          m_valid,
  output logic [DW-1:0] m_data,
  output logic          m_last,
  input  logic          m_ready,
  // status
  output logic          busy,
  output logic          done,
  output logic          overrun
);
  localparam int unsigned QAW = $clog2(QD);

  logic [31:0]    issue_left;   // FIFO reads still to issue
  logic [31:0]    send_left;    // words still to hand over
  logic [DW-1:0]  q [QD];
  logic [QAW-1:0] q_wp, q_rp;
  logic [QAW:0]   q_cnt;
  logic           rd_en_d;

  assign m_valid = (q_cnt != '0);
  assign m_data  = q[q_rp];
  assign m_last  = m_valid && (send_left == 32'd1);

  wire pop = m_valid && m_ready;
  assign fifo_rd_en = busy && (issue_left != 32'd0) && !fifo_empty &&
                      (32'(q_cnt) + 32'(rd_en_d) < QD);

  always_ff @(posedge clk)
    if (fifo_rd_valid) q[q_wp] <= fifo_rd_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      overrun    <= 1'b0;
      issue_left <= '0;
      send_left  <= '0;
      q_wp       <= '0;
      q_rp       <= '0;
      q_cnt      <= '0;
      rd_en_d    <= 1'b0;
    end else begin
      done    <= 1'b0;
      rd_en_d <= fifo_rd_en;
      if (clr) overrun <= 1'b0;
      if (fifo_rd_valid) q_wp <= q_wp + 1'b1;
      if (pop)           q_rp <= q_rp + 1'b1;
      q_cnt <= q_cnt + (QAW+1)'(fifo_rd_valid) - (QAW+1)'(pop);
      if (fifo_rd_en) issue_left <= issue_left - 32'd1;
      if (start) begin
        if (busy) overrun <= 1'b1;
        else if (burst_words != 32'd0) begin
          busy       <= 1'b1;
          issue_left <= burst_words;
          send_left  <= burst_words;
        end
      end
      if (pop) begin
        send_left <= send_left - 32'd1;
        if (send_left == 32'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end

  // the DMA core must not see a word vanish before it takes it
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (m_valid && !m_ready) |=> (m_valid && $stable(m_data));
  endproperty
  a_hold: assert property (p_hold);
endmodule
