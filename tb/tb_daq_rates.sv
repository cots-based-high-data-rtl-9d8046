// tb_daq_rates: end-to-end runs of the acquisition firmware at the other two
// sampling rates of the reflectometer, with the design at its default sizes.
//
//  * 100 MSPS (bit clock 300 MHz, the highest rate the FIFO write port and
//    the 96-bit sample bus are specified for), 4 frames x 2048 samples:
//    a full 128 KiB burst;
//  * 40 MSPS (bit clock 120 MHz), 4 frames x 1024 samples: 64 KiB.
//
// Each run resets the board, lets the LVDS receiver align, fires one burst
// from the internal trigger generator (frames 35 us apart) with a timed DMA
// start, and checks every uploaded word, the
// word count, and that the upload ends between the last sample and 2 us
// after it (second timestamp = DMA stop, 5 ns ticks). Both clock edges of
// the ADC side are made by one loop, so the bit and frame clocks keep their
// 3:1 ratio and phase when the rate changes.
//
// The DMA start offset depends on the rate. At 100 MSPS the input fills the
// FIFO at 1.6 GB/s against the 2 GB/s of the DMA stream, so an upload that
// starts late cannot catch up within the last frame: a start 64 us after
// the trigger ends about 4 us after the last sample, a start at 20 us ends
// with it. At 40 MSPS (0.64 GB/s in) the 64 us start catches up easily.
module tb_daq_rates;
  import daq_pkg::*;

  logic rst_n = 1'b0;
  logic dclk = 1'b0, fclk = 1'b0, clk_ts = 1'b0, clk_ctrl = 1'b0, clk_spi = 1'b0, clk_dma = 1'b0;
  logic [2:0] skew = 3'd4;
  logic [2*NUM_CH-1:0] lane_rise, lane_fall;
  logic fclk_rise, fclk_fall;
  logic acq_trig = 1'b0;
  logic spi_sclk, spi_sdata;
  logic spi_sdo = 1'b0;
  logic [SPI_CS-1:0] spi_cs_n;
  logic dma_valid, dma_last, dma_ready = 1'b1, dma_done;
  logic [RD_W-1:0] dma_data;
  logic t_req = 1'b0, t_we = 1'b0, t_busy, t_ack;
  logic [REG_AW-1:0] t_addr = '0;
  logic [REG_W-1:0] t_wdata = '0, t_rdata;
  logic [EXT_IO-1:0] ext_io_in = '0, ext_io_out, ext_io_oe;
  int checks = 0, failures = 0;
  int td = 3333;                    // bit clock period in ps

  reflecto_daq_top dut (.*);

  adc_lvds_model #(.CH(NUM_CH)) u_adc (.dclk, .skew, .lane_rise, .lane_fall, .fclk_rise, .fclk_fall);

  // ADC clocks: three bit-clock periods per frame-clock period, the frame
  // clock rising a quarter bit period before a bit-clock rising edge
  initial forever begin
    int t;
    t = td;
    dclk = 1'b0; #(t/4 * 1ps);
    fclk = 1'b1; #(t/4 * 1ps);
    dclk = 1'b1; #(t/2 * 1ps);
    dclk = 1'b0; #(t/2 * 1ps);
    dclk = 1'b1; #(t/4 * 1ps);
    fclk = 1'b0; #(t/4 * 1ps);
    dclk = 1'b0; #(t/2 * 1ps);
    dclk = 1'b1; #((3*t - 4*(t/4) - 3*(t/2)) * 1ps);
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

  // ------------------------------------------------ DMA sink model
  int n_words = 0, n_last = 0, n_dma_done = 0, n_bad = 0, set_in_frame = 0, frame_size = 2048;
  logic [8:0] prev_n;
  always @(posedge clk_dma) if (rst_n) begin
    if (dma_done) n_dma_done++;
    if (dma_valid && dma_ready) begin
      logic [8:0] n0;
      bit ok;
      int h;
      h = n_words % 2;
      n0 = dma_data[8:0];
      ok = 1;
      for (int k = 0; k < 4; k++)
        if (dma_data[k*16 +: 16] != {4'h0, 3'(4*h + k), n0}) ok = 0;
      if (h == 1 && n0 != prev_n) ok = 0;
      if (h == 0 && set_in_frame != 0 && n0 != prev_n + 9'd1) ok = 0;
      if (!ok) begin
        n_bad++;
        if (n_bad < 4) $display("bad word %h at word %0d", dma_data, n_words);
      end
      prev_n = n0;
      if (h == 1) set_in_frame = (set_in_frame + 1 == frame_size) ? 0 : set_in_frame + 1;
      n_words++;
      if (dma_last) n_last++;
    end
  end

  // one burst at bit-clock period t_ps with frames of fs samples, the DMA
  // starting ofs_ticks (5 ns) after the burst trigger
  task automatic run_rate(input int t_ps, input int fs, input int ofs_ticks, input string name);
    logic [REG_W-1:0] q;
    longint last_tick, dt;
    rst_n = 1'b0;
    td = t_ps;
    #1us;
    n_words = 0; n_last = 0; n_dma_done = 0; n_bad = 0; set_in_frame = 0;
    frame_size = fs;
    rst_n = 1'b1;
    #200ns;
    do rd(REG_STATUS, q); while (!q[0]);
    check(q[0], {name, ": LVDS lock"});
    wr(REG_FRAME_SIZE, 128'(fs));
    wr(REG_DMA_OFFSET, 128'(ofs_ticks));
    wr(REG_CTRL, 128'h23);                         // enable, internal trigger, ts2 = DMA stop
    wait (n_dma_done == 1);
    wr(REG_CTRL, 128'h0);
    check(n_words == 8 * fs, $sformatf("%s: words %0d", name, n_words));
    check(n_last == 1, {name, ": last flag"});
    check(n_bad == 0, {name, ": data"});
    rd(REG_TIMERS, q);
    // the fourth frame starts 3 x 35 us after the burst trigger and lasts
    // fs frame-clock periods of 3 bit-clock periods each
    last_tick = 64'd21000 + (64'(fs) * 3 * t_ps) / 5000;
    dt = longint'(q[95:48]) - longint'(q[47:0]);
    check(dt >= last_tick && dt < last_tick + 400,
          $sformatf("%s: DMA end %0d ticks after the burst trigger, last sample at %0d", name, dt, last_tick));
    rd(REG_STATUS, q);
    check(q[31:16] == 16'd1 && q[63:48] == 16'd1 && !q[2] && !q[4], {name, ": one burst, one DMA, no overflow"});
  endtask

  initial begin
    run_rate(3333, 2048, 4000, "100 MSPS, 4 x 2048");     // DMA start at 20 us
    run_rate(8333, 1024, 12800, "40 MSPS, 4 x 1024");     // DMA start at 64 us
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
