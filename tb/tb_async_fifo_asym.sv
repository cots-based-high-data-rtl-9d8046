// tb_async_fifo_asym: self-checking test of the 128:64 dual-clock FIFO at
// its full 128 KiB size. Write clock 100 MHz, read clock 250 MHz.
// 1) Fill with random words until full: exactly 8192 writes must be taken.
// 2) Drain: 16384 halves must come out, low half of each word first, in
//    order, and empty must rise at the end.
// 3) Random simultaneous writing and reading, every half compared.
module tb_async_fifo_asym;
  localparam int WR_W = 128, RD_W = 64, BYTES = 128 * 1024;
  localparam int DEPTH = BYTES / (WR_W / 8);
  logic wr_clk = 1'b0, rd_clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [WR_W-1:0] wr_data = '0;
  logic [RD_W-1:0] rd_data;
  logic full, empty, rd_valid;
  int checks = 0, failures = 0;

  async_fifo_asym #(.WR_W(WR_W), .RD_W(RD_W), .FIFO_BYTES(BYTES)) dut (
    .wr_clk, .wr_rst_n(rst_n), .wr_en, .wr_data, .full,
    .rd_clk, .rd_rst_n(rst_n), .rd_en, .rd_data, .rd_valid, .empty);

  always #5ns wr_clk = ~wr_clk;
  always #2ns rd_clk = ~rd_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [RD_W-1:0] sb[$];
  int n_wr = 0, n_rd = 0, n_bad = 0;

  function automatic logic [WR_W-1:0] rnd_word();
    for (int i = 0; i < WR_W / 32; i++) rnd_word[i*32 +: 32] = $urandom;
  endfunction

  // writer bookkeeping: a write is taken when wr_en && !full at the edge
  always @(posedge wr_clk)
    if (rst_n && wr_en && !full) begin
      n_wr++;
      sb.push_back(wr_data[63:0]);
      sb.push_back(wr_data[127:64]);
    end

  always @(posedge rd_clk)
    if (rd_valid) begin
      n_rd++;
      if (sb.size() == 0 || rd_data != sb.pop_front()) n_bad++;
    end

  initial begin
    repeat (4) @(posedge wr_clk);
    rst_n = 1'b1;
    repeat (4) @(posedge wr_clk);
    check(empty && !full, "empty after reset");
    // 1) fill
    while (!full) begin
      @(negedge wr_clk); wr_en = 1'b1; wr_data = rnd_word();
      @(posedge wr_clk); #1ps;
    end
    @(negedge wr_clk); wr_en = 1'b0;
    check(n_wr == DEPTH, $sformatf("writes until full: %0d", n_wr));
    @(negedge wr_clk); wr_en = 1'b1; wr_data = rnd_word();
    @(negedge wr_clk); wr_en = 1'b0;
    check(n_wr == DEPTH, "write while full ignored");
    check(n_rd == 0, "nothing read yet");
    // 2) drain
    @(negedge rd_clk); rd_en = 1'b1;
    wait (empty);
    @(negedge rd_clk); rd_en = 1'b0;
    repeat (4) @(posedge rd_clk);
    check(n_rd == 2 * DEPTH, $sformatf("halves read: %0d", n_rd));
    check(n_bad == 0, "drained data in order, low half first");
    check(!full, "not full after drain");
    // 3) random traffic
    fork
      repeat (3000) begin
        @(negedge wr_clk); wr_en = ($urandom % 4) != 0; wr_data = rnd_word();
      end
      repeat (7000) begin
        @(negedge rd_clk); rd_en = ($urandom % 3) != 0;
      end
    join
    @(negedge wr_clk); wr_en = 1'b0;
    @(negedge rd_clk); rd_en = 1'b1;
    repeat (40) @(posedge wr_clk);
    wait (empty);
    repeat (8) @(posedge rd_clk);
    check(n_bad == 0, "random traffic data");
    check(n_rd == 2 * n_wr, "every written half read once");
    check(sb.size() == 0, "scoreboard empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
