// tb_main_ctrl: self-checking test of the control register file.
// Checks reset values, write/read-back of every read/write register, the
// one-cycle read latency, the configuration outputs, the serial command
// and its start pulse, the serial busy flag, status flags, event counters
// and their clearing, the timer register, the serial read-back word, the
// software trigger pulse, the general-purpose line register and the
// per-frame timestamp registers.
module tb_main_ctrl;
  import daq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic reg_wr = 1'b0, reg_rd = 1'b0, reg_rvalid;
  logic [REG_AW-1:0] reg_addr = '0;
  logic [REG_W-1:0] reg_wdata = '0, reg_rdata;
  daq_cfg_t cfg;
  spi_cmd_t spi_cmd;
  logic spi_start, status_clr, sw_trig;
  logic [EXT_IO-1:0] ext_io_in = '0, ext_io_out, ext_io_oe;
  logic lvds_locked = 0, acq_busy = 0, fifo_overflow = 0, dma_busy = 0, dma_overrun = 0;
  logic [7:0] slip_count = 8'd0;
  logic burst_done_evt = 0, missed_trig_evt = 0, dma_done_evt = 0, spi_done_evt = 0;
  logic [REG_W-1:0] timers = '0;
  logic [FRAME_TS_N*TS_W-1:0] frame_ts = '0;
  logic [31:0] spi_rdata = '0;
  int checks = 0, failures = 0;
  int n_spi_start = 0, n_clr = 0, n_sw = 0;

  main_ctrl dut (.clk, .rst_n, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata, .reg_rvalid,
    .cfg, .spi_cmd, .spi_start, .status_clr, .sw_trig, .ext_io_in, .ext_io_out, .ext_io_oe, .lvds_locked, .slip_count, .acq_busy, .fifo_overflow,
    .dma_busy, .dma_overrun, .burst_done_evt, .missed_trig_evt, .dma_done_evt, .spi_done_evt,
    .timers, .frame_ts, .spi_rdata);

  always #5ns clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (spi_start) n_spi_start++;
    if (status_clr) n_clr++;
    if (sw_trig) n_sw++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input reg_addr_e a, input logic [REG_W-1:0] d);
    @(negedge clk); reg_wr = 1'b1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 1'b0;
  endtask
  task automatic rd(input reg_addr_e a, output logic [REG_W-1:0] d);
    @(negedge clk); reg_rd = 1'b1; reg_addr = a;
    @(negedge clk); reg_rd = 1'b0;
    check(reg_rvalid, "read valid one cycle later");
    d = reg_rdata;
    @(negedge clk);
    check(!reg_rvalid, "read valid for one cycle");
  endtask
  task automatic pulse(ref logic s, input int n);
    repeat (n) begin @(negedge clk); s = 1'b1; @(negedge clk); s = 1'b0; end
  endtask

  initial begin
    logic [REG_W-1:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    rd(REG_FRAME_SIZE, d); check(d == 128'd2048, "frame size reset 2048");
    rd(REG_FRAMES, d);     check(d == 128'd4, "frames reset 4");
    rd(REG_TRIG_FRAME, d); check(d == 128'd7000, "frame period reset 35 us");
    rd(REG_TRIG_BURST, d); check(d == 128'd200000, "burst period reset 1 ms");
    rd(REG_CTRL, d);       check(d == 128'd0, "ctrl reset 0");
    check(!cfg.acq_enable, "disabled after reset");
    // read/write registers
    wr(REG_FRAME_SIZE, 128'd1024); rd(REG_FRAME_SIZE, d); check(d == 128'd1024 && cfg.frame_size == 16'd1024, "frame size");
    wr(REG_FRAMES, 128'd8);        rd(REG_FRAMES, d);     check(d == 128'd8 && cfg.frames_per_burst == 8'd8, "frames");
    wr(REG_TRIG_FRAME, 128'd123);  rd(REG_TRIG_FRAME, d); check(cfg.trig_frame_period == 32'd123 && d == 128'd123, "frame period");
    wr(REG_TRIG_BURST, 128'd4567); rd(REG_TRIG_BURST, d); check(cfg.trig_burst_period == 32'd4567 && d == 128'd4567, "burst period");
    wr(REG_DMA_OFFSET, 128'd89);   rd(REG_DMA_OFFSET, d); check(cfg.dma_offset == 32'd89 && d == 128'd89, "dma offset");
    wr(REG_CTRL, 128'h23);         rd(REG_CTRL, d);
    check(d == 128'h23 && cfg.acq_enable && cfg.trig_internal && cfg.ts2_sel == TS2_DMA_STOP, "ctrl bits");
    wr(REG_SCRATCH, {32'hdeadbeef, 32'h01234567, 32'h89abcdef, 32'h55aa55aa});
    rd(REG_SCRATCH, d); check(d == {32'hdeadbeef, 32'h01234567, 32'h89abcdef, 32'h55aa55aa}, "scratch 128 bit");
    // serial command
    check(n_spi_start == 0, "no serial start yet");
    wr(REG_SPI_CMD, {85'd0, 3'd4, 3'd0, 5'd23, 32'h00ab_cdef});
    @(negedge clk);
    check(n_spi_start == 1, "serial start pulse");
    check(spi_cmd.cs_sel == 3'd4 && spi_cmd.len_m1 == 5'd23 && spi_cmd.data == 32'h00ab_cdef, "serial command fields");
    rd(REG_STATUS, d); check(d[5], "serial busy after command");
    pulse(spi_done_evt, 1);
    rd(REG_STATUS, d); check(!d[5], "serial busy cleared by done");
    spi_rdata = 32'hcafe_f00d;
    repeat (3) @(posedge clk);
    rd(REG_SPI_RDATA, d); check(d == 128'hcafe_f00d, "serial read word");
    // status flags and counters
    lvds_locked = 1; fifo_overflow = 1; dma_overrun = 1; slip_count = 8'd3;
    pulse(burst_done_evt, 3); pulse(missed_trig_evt, 2); pulse(dma_done_evt, 5);
    rd(REG_STATUS, d);
    check(d[0] && !d[1] && d[2] && !d[3] && d[4], "status flags");
    check(d[15:8] == 8'd3, "alignment move count");
    check(d[31:16] == 16'd3 && d[47:32] == 16'd2 && d[63:48] == 16'd5, "event counters");
    wr(REG_CTRL, 128'h123);
    @(negedge clk);
    check(n_clr == 1, "clear pulse");
    rd(REG_STATUS, d); check(d[63:16] == '0, "counters cleared");
    check(cfg.acq_enable, "clear keeps enable");
    // timers register
    timers = {32'd7, 48'h1234_5678_9abc, 48'h0fed_cba9_8765};
    repeat (3) @(posedge clk);
    rd(REG_TIMERS, d); check(d == timers, "timer register");
    // per-frame timestamps
    frame_ts = {48'h4444_0000_0004, 48'h3333_0000_0003, 48'h2222_0000_0002, 48'h1111_0000_0001};
    repeat (3) @(posedge clk);
    rd(REG_FRAME_TS01, d); check(d == {32'd0, 48'h2222_0000_0002, 48'h1111_0000_0001}, "frame 0 and 1 timestamps");
    rd(REG_FRAME_TS23, d); check(d == {32'd0, 48'h4444_0000_0004, 48'h3333_0000_0003}, "frame 2 and 3 timestamps");
    // software trigger: one pulse per write with bit 2, none otherwise
    check(n_sw == 0, "no software trigger yet");
    wr(REG_CTRL, 128'h7);
    @(negedge clk);
    check(n_sw == 1 && cfg.acq_enable && cfg.trig_internal, "software trigger pulse");
    rd(REG_CTRL, d); check(d == 128'h3, "trigger bit reads back 0");
    wr(REG_CTRL, 128'h1);
    @(negedge clk);
    check(n_sw == 1 && n_clr == 1, "no pulse without bit 2");
    // general-purpose lines
    rd(REG_EXT_IO, d); check(d == 128'd0 && ext_io_oe == '0, "lines undriven after reset");
    wr(REG_EXT_IO, 128'h9);
    check(ext_io_out == 2'b01 && ext_io_oe == 2'b10, "line levels and enables");
    ext_io_in = 2'b10;
    repeat (3) @(posedge clk);
    rd(REG_EXT_IO, d); check(d == 128'h29, "line read-back");
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
