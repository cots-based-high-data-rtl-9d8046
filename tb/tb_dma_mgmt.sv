// tb_dma_mgmt: self-checking test of the DMA management block with a
// behavioural FIFO (one cycle read latency) and a DMA-core sink.
// 1) Prefilled FIFO, sink always ready: the burst must stream at one
//    64-bit word per clock (the 2 GB/s of the link), in order, m_last on the
//    last word only, done once.
// 2) Start on an empty FIFO that fills slowly, sink randomly not ready: the
//    transfer must stall and resume and still deliver every word in order.
// 3) A start during a transfer sets overrun; clr clears it.
module tb_dma_mgmt;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, clr = 1'b0, m_ready = 1'b0;
  logic [31:0] burst_words = '0;
  logic fifo_rd_en, fifo_rd_valid = 1'b0, fifo_empty;
  logic [63:0] fifo_rd_data = '0;
  logic m_valid, m_last, busy, done, overrun;
  logic [63:0] m_data;
  int checks = 0, failures = 0;

  dma_mgmt dut (.clk, .rst_n, .start, .burst_words, .clr, .fifo_rd_en, .fifo_rd_data,
    .fifo_rd_valid, .fifo_empty, .m_valid, .m_data, .m_last, .m_ready, .busy, .done, .overrun);

  always #2ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // behavioural FIFO
  logic [63:0] fq[$];
  logic [63:0] next_in = 64'h1000;
  assign fifo_empty = (fq.size() == 0);
  always @(posedge clk) begin
    fifo_rd_valid <= 1'b0;
    if (fifo_rd_en) begin
      if (fq.size() == 0) check(0, "read from empty FIFO");
      else begin fifo_rd_data <= fq.pop_front(); fifo_rd_valid <= 1'b1; end
    end
  end
  task automatic push(input int n);
    repeat (n) begin fq.push_back(next_in); next_in++; end
  endtask

  // sink
  logic [63:0] expect_w = 64'h1000;
  int n_rx = 0, n_last = 0, n_done = 0, stall = 0, first_cyc = -1, last_cyc = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && done) n_done++;
    if (busy && !m_valid) stall++;
    if (m_valid && m_ready) begin
      check(m_data == expect_w, "word order");
      expect_w++;
      if (first_cyc < 0) first_cyc = cyc;
      last_cyc = cyc;
      n_rx++;
      if (m_last) n_last++;
    end
  end

  task automatic pulse_start(input int words);
    @(negedge clk); burst_words = words; start = 1'b1;
    @(negedge clk); start = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // 1) full speed
    push(256);
    m_ready = 1'b1;
    pulse_start(256);
    wait (n_done == 1);
    repeat (3) @(posedge clk);
    check(n_rx == 256, "burst 1 length");
    check(n_last == 1, "one m_last in burst 1");
    check(last_cyc - first_cyc == 255, $sformatf("one word per clock (%0d cycles)", last_cyc - first_cyc + 1));
    check(!busy, "idle after burst 1");
    // 2) slow producer, random ready
    n_rx = 0; n_last = 0; stall = 0;
    pulse_start(300);
    fork
      repeat (300) begin repeat (3) @(negedge clk); push(1); end
      repeat (1500) begin @(negedge clk); m_ready = ($urandom % 3) != 0; end
    join
    m_ready = 1'b1;
    wait (n_done == 2);
    repeat (3) @(posedge clk);
    check(n_rx == 300, "burst 2 length");
    check(n_last == 1, "one m_last in burst 2");
    check(stall > 100, "transfer stalled on empty FIFO");
    check(fq.size() == 0, "nothing left behind");
    // 3) overrun
    check(!overrun, "no overrun yet");
    push(8);
    m_ready = 1'b0;
    pulse_start(8);
    pulse_start(8);
    check(overrun, "start while busy flagged");
    m_ready = 1'b1;
    wait (n_done == 3);
    @(negedge clk) clr = 1'b1; @(negedge clk) clr = 1'b0;
    check(!overrun, "overrun cleared");
    check(n_rx == 308, "third burst not doubled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
