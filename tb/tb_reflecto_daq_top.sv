// tb_reflecto_daq_top: end-to-end test of the acquisition firmware at its
// default sizes (128 KiB FIFO, 2048-sample frames, 4 frames per burst).
//
// The ADCs run at 80 MSPS (bit clock 240 MHz) with a skewed LVDS stream;
// the host side is a DMA-core model that accepts the 64-bit stream and
// issues register accesses through the target port. Sequence:
//  1. register bridge check, serial programming of the PLL select,
//     LVDS word alignment and lock;
//  2. burst A: internal triggers (4 x 35 us), DMA start 64 us after the
//     burst trigger so the upload overlaps the acquisition and stalls on an
//     empty FIFO; all 16384 words are checked and the DMA must end within
//     2 us of the last sample (second timestamp = DMA stop);
//  3. burst B: external triggers, small frames, one trigger inside a frame
//     (missed), a stalling DMA sink, second timestamp = acquisition stop;
//     then a burst started by two software triggers written by the host;
//     the general-purpose lines are driven and read back;
//  4. burst C: a five-frame burst into a sink that never accepts, which
//     must overflow the 128 KiB FIFO.
// Every mechanism is counted; one that never happened is a failure.
module tb_reflecto_daq_top;
  import daq_pkg::*;
  localparam int TD = 4166;         // dclk period in ps (240 MHz, fclk 80 MHz)

  logic rst_n = 1'b0;
  logic dclk = 1'b0, fclk = 1'b0, clk_ts = 1'b0, clk_ctrl = 1'b0, clk_spi = 1'b0, clk_dma = 1'b0;
  logic [2:0] skew = 3'd3;
  logic [2*NUM_CH-1:0] lane_rise, lane_fall;
  logic fclk_rise, fclk_fall;
  logic acq_trig = 1'b0;
  logic spi_sclk, spi_sdata, spi_sdo;
  logic [SPI_CS-1:0] spi_cs_n;
  logic dma_valid, dma_last, dma_ready = 1'b1, dma_done;
  logic [RD_W-1:0] dma_data;
  logic t_req = 1'b0, t_we = 1'b0, t_busy, t_ack;
  logic [REG_AW-1:0] t_addr = '0;
  logic [REG_W-1:0] t_wdata = '0, t_rdata;
  logic [EXT_IO-1:0] ext_io_in, ext_io_out, ext_io_oe;
  logic [EXT_IO-1:0] ext_pin = 2'b10;   // level an outside source puts on an undriven line
  int checks = 0, failures = 0;

  assign ext_io_in = (ext_io_oe & ext_io_out) | (~ext_io_oe & ext_pin);

  reflecto_daq_top dut (.*);

  adc_lvds_model #(.CH(NUM_CH)) u_adc (.dclk, .skew, .lane_rise, .lane_fall, .fclk_rise, .fclk_fall);

  always #(TD/2 * 1ps) dclk = ~dclk;
  initial begin
    #(TD/4 * 1ps);
    forever begin fclk = 1'b1; #(3*TD/2 * 1ps); fclk = 1'b0; #(3*TD/2 * 1ps); end
  end
  always #2.5ns clk_ts   = ~clk_ts;
  always #5ns   clk_ctrl = ~clk_ctrl;
  always #25ns  clk_spi  = ~clk_spi;
  always #2ns   clk_dma  = ~clk_dma;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------ register access (host)
  task automatic reg_access(input bit we, input reg_addr_e a, input logic [REG_W-1:0] d,
                            output logic [REG_W-1:0] q);
    @(negedge clk_dma); t_req = 1'b1; t_we = we; t_addr = a; t_wdata = d;
    @(negedge clk_dma); t_req = 1'b0;
    while (!t_ack) @(posedge clk_dma);
    q = t_rdata;
    @(negedge clk_dma);
  endtask
  task automatic wr(input reg_addr_e a, input logic [REG_W-1:0] d);
    logic [REG_W-1:0] q;
    reg_access(1'b1, a, d, q);
  endtask
  task automatic rd(input reg_addr_e a, output logic [REG_W-1:0] q);
    reg_access(1'b0, a, '0, q);
  endtask

  // ------------------------------------------------ serial device model
  logic [31:0] spi_rx;
  int spi_bits = 0, n_spi = 0;
  logic [SPI_CS-1:0] spi_sel_seen = '0;
  assign spi_sdo = 1'b1;
  always @(posedge spi_sclk) if (spi_cs_n != '1) begin
    spi_rx = {spi_rx[30:0], spi_sdata}; spi_bits++; spi_sel_seen |= ~spi_cs_n;
  end

  // ------------------------------------------------ DMA sink model
  int n_words = 0, n_last = 0, n_dma_done = 0, n_backpressure = 0, n_stall = 0, n_bad = 0;
  int set_in_frame = 0, frame_size = 2048;
  logic [8:0] prev_n;
  logic in_burst = 1'b0;
  always @(posedge clk_dma) if (rst_n) begin
    if (dma_done) begin n_dma_done++; in_burst = 1'b0; end
    if (dma_valid && !dma_ready) n_backpressure++;
    if (in_burst && !dma_valid) n_stall++;
    if (dma_valid && dma_ready) begin
      logic [8:0] n0;
      bit ok;
      int h;
      h = n_words % 2;
      n0 = dma_data[8:0];
      ok = 1;
      for (int k = 0; k < 4; k++) begin
        if (dma_data[k*16 +: 16] != {4'h0, 3'(4*h + k), n0}) ok = 0;
      end
      if (h == 1 && n0 != prev_n) ok = 0;
      if (h == 0 && set_in_frame != 0 && n0 != prev_n + 9'd1) ok = 0;
      if (!ok) begin
        n_bad++;
        if (n_bad < 4) $display("bad word %h at word %0d", dma_data, n_words);
      end
      prev_n = n0;
      if (h == 1) set_in_frame = (set_in_frame + 1 == frame_size) ? 0 : set_in_frame + 1;
      n_words++;
      in_burst = !dma_last;
      if (dma_last) n_last++;
    end
  end

  // mechanism counters
  int n_ext_trig = 0, n_int_burst = 0, n_missed = 0, n_overflow = 0, n_slip = 0;
  int n_soft_trig = 0, n_gpio = 0;

  task automatic ext_pulse();
    acq_trig = 1'b1; #100ns; acq_trig = 1'b0;
  endtask

  initial begin
    logic [REG_W-1:0] q;
    logic [47:0] ts1, ts2;
    int words_before;
    time t0;
    #50ns rst_n = 1'b1;
    #200ns;
    // ---------------------------------------------------------- step 1
    wr(REG_SCRATCH, 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210);
    rd(REG_SCRATCH, q);
    check(q == 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210, "register bridge round trip");
    rd(REG_FRAME_SIZE, q); check(q[15:0] == 16'd2048, "default frame size");
    wr(REG_SPI_CMD, {85'd0, 3'd4, 3'd0, 5'd23, 32'h00a5_5a3c});
    do rd(REG_STATUS, q); while (q[5]);
    n_spi++;
    check(spi_bits == 24 && spi_rx[23:0] == 24'ha55a3c, "serial word delivered to PLL");
    check(spi_sel_seen == 5'b10000, "PLL select only");
    rd(REG_SPI_RDATA, q); check(q[23:0] == 24'hffffff, "serial read-back");
    do rd(REG_STATUS, q); while (!q[0]);
    n_slip = int'(q[15:8]);
    check(n_slip != 0, "LVDS alignment moved the word boundary");
    // ---------------------------------------------------------- step 2
    wr(REG_DMA_OFFSET, 128'd12800);                  // 64 us
    wr(REG_CTRL, 128'h23);                           // enable, internal trigger, ts2 = DMA stop
    wait (n_dma_done == 1);
    t0 = $time;
    wr(REG_CTRL, 128'h0);
    check(n_words == 16384, $sformatf("burst A words: %0d", n_words));
    check(n_last == 1, "burst A last flag");
    check(n_bad == 0, "burst A data");
    check(n_stall > 100, $sformatf("DMA overlapped the acquisition and waited for data (%0d cycles)", n_stall));
    rd(REG_TIMERS, q);
    ts1 = q[47:0]; ts2 = q[95:48];
    check(q[127:96] == 32'd0, "burst A frame id 0");
    // each frame has its own trigger timestamp, 35 us (7000 ticks) apart
    rd(REG_FRAME_TS01, q);
    check(q[47:0] == ts1 && q[95:48] == ts1 + 48'd7000, "frame 0 and 1 timestamps");
    rd(REG_FRAME_TS23, q);
    check(q[47:0] == ts1 + 48'd14000 && q[95:48] == ts1 + 48'd21000, "frame 2 and 3 timestamps");
    // last sample: 3 x 7000 ticks + 2048 samples at 12.498 ns = 26119 ticks
    check(ts2 - ts1 >= 48'd26119 && ts2 - ts1 < 48'd26519,
          $sformatf("DMA stop timestamp - burst timestamp = %0d ticks", ts2 - ts1));
    rd(REG_STATUS, q);
    check(q[31:16] == 16'd1 && q[63:48] == 16'd1, "one burst, one DMA in status");
    n_int_burst = int'(q[31:16]);
    check(!q[2] && !q[4], "no overflow or overrun in burst A");
    // ---------------------------------------------------------- step 3
    frame_size = 256;
    wr(REG_FRAME_SIZE, 128'd256);
    wr(REG_FRAMES, 128'd2);
    wr(REG_DMA_OFFSET, 128'd0);
    wr(REG_CTRL, 128'h11);                           // enable, external trigger, ts2 = acq stop
    #1us;
    words_before = n_words;
    fork
      begin
        ext_pulse(); #1us; ext_pulse(); #4us; ext_pulse();
        n_ext_trig = 3;
      end
      repeat (4000) begin @(negedge clk_dma); dma_ready = ($urandom % 4) != 0; end
    join
    dma_ready = 1'b1;
    wait (n_dma_done == 2);
    check(n_words - words_before == 1024, $sformatf("burst B words: %0d", n_words - words_before));
    check(n_bad == 0, "burst B data");
    check(n_ext_trig == 3, "three external triggers");
    check(n_backpressure > 100, "sink back-pressure seen");
    rd(REG_STATUS, q);
    check(q[47:32] == 16'd1, "one missed trigger");
    n_missed = int'(q[47:32]);
    check(q[31:16] == 16'd2 && q[63:48] == 16'd2, "two bursts, two DMAs");
    rd(REG_TIMERS, q);
    // second frame trigger 5.1 us after the first, 256 samples x 12.5 ns
    check(q[95:48] - q[47:0] > 48'd1600 && q[95:48] - q[47:0] < 48'd1700,
          $sformatf("acq stop - burst start = %0d ticks", q[95:48] - q[47:0]));
    check(q[127:96] == 32'd0, "frame id restarts with the run");
    // software triggers: one burst of two frames
    words_before = n_words;
    wr(REG_CTRL, 128'h15);                           // + software trigger
    #5us;
    wr(REG_CTRL, 128'h15);
    wait (n_dma_done == 3);
    n_soft_trig = 2;
    check(n_words - words_before == 1024, $sformatf("software-trigger burst words: %0d", n_words - words_before));
    check(n_bad == 0, "software-trigger burst data");
    rd(REG_STATUS, q);
    check(q[31:16] == 16'd3 && q[47:32] == 16'd1, "software triggers: one more burst, no miss");
    // general-purpose lines
    rd(REG_EXT_IO, q); check(q[5:0] == 6'h20 && ext_io_oe == '0, "lines undriven, outside levels read");
    wr(REG_EXT_IO, 128'h5);
    #200ns;
    rd(REG_EXT_IO, q); check(q[5:0] == 6'h35 && ext_io_out == 2'b01 && ext_io_oe == 2'b01, "line I driven high");
    wr(REG_EXT_IO, 128'h4);
    #200ns;
    rd(REG_EXT_IO, q); check(q[5:0] == 6'h24, "line I driven low");
    n_gpio = 2;
    // ---------------------------------------------------------- step 4
    wr(REG_CTRL, 128'h0);
    frame_size = 2048;
    wr(REG_FRAME_SIZE, 128'd2048);
    wr(REG_FRAMES, 128'd5);
    dma_ready = 1'b0;
    wr(REG_CTRL, 128'h3);
    #180us;
    rd(REG_STATUS, q);
    check(q[2], "FIFO overflow flagged");
    n_overflow = int'(q[2]);
    wr(REG_CTRL, 128'h100);                          // disable and clear
    #1us;
    rd(REG_STATUS, q);
    check(!q[2] && q[63:16] == '0, "status cleared");
    // ---------------------------------------------------------- summary
    $display("mechanisms: align=%0d spi=%0d int_burst=%0d ext_trig=%0d soft_trig=%0d missed=%0d stall=%0d backpressure=%0d overflow=%0d gpio=%0d",
             n_slip, n_spi, n_int_burst, n_ext_trig, n_soft_trig, n_missed, n_stall, n_backpressure, n_overflow, n_gpio);
    check(n_slip != 0, "mechanism: word alignment");
    check(n_spi != 0, "mechanism: serial programming");
    check(n_int_burst != 0, "mechanism: internal trigger burst");
    check(n_ext_trig != 0, "mechanism: external trigger");
    check(n_missed != 0, "mechanism: missed trigger");
    check(n_stall != 0, "mechanism: DMA waits for data (overlap)");
    check(n_backpressure != 0, "mechanism: DMA core back-pressure");
    check(n_overflow != 0, "mechanism: FIFO overflow");
    check(n_soft_trig != 0, "mechanism: software trigger");
    check(n_gpio != 0, "mechanism: general-purpose lines");
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
