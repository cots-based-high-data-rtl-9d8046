// reflecto_daq_top: FPGA firmware of an eight-channel, 12-bit real-time
// acquisition board that uploads bursts of ADC samples into host memory
// over PCIe with DMA.
//
// Data flow (right half of the block diagram): the LVDS receiver rebuilds
// one set of eight samples per frame clock; the buffering control cuts the
// stream into triggered frames and bursts, pads every sample to 16 bits and
// writes 128-bit words into a 128 KiB dual-clock FIFO; the DMA management
// reads it 64 bits at a time at 250 MHz and streams one burst per DMA start
// into the DMA core. Control (left half): the frame timer keeps a 48-bit
// 200 MHz time, selects the external or internal trigger, timestamps every
// burst and fires the DMA start a programmed time after the burst trigger
// so the upload overlaps the acquisition; the main control registers are
// reached through the slave management bridge, and a serial port programs
// the ADCs and the acquisition PLL.
//
// The PCIe endpoint and the DMA core are bought-in cores and are not part
// of this module: their side appears as a 64-bit valid/ready stream
// (dma_*) and a register access port (t_*), both on clk_dma. The clocks of
// the board come in as ports:
//   dclk    ADC bit clock (3 x fclk), with the DDR input bits of 16 data
//           lanes and of the frame clock
//   fclk    ADC frame clock = sample rate (40, 80 or 100 MHz)
//   clk_ts  200 MHz from the acquisition PLL, in phase with the timing
//           system
//   clk_ctrl 100 MHz and clk_spi 20 MHz logic clocks
//   clk_dma 250 MHz user clock of the DMA/PCIe core
// Two general-purpose lines toward the interface board's trigger/IO
// connectors (ext_io_*: pin level in, level and enable out) are set and
// read through a control register; a software trigger written there enters
// the frame timer like an external trigger.
// Events move between domains through toggle synchronisers; configuration
// words are taken as static while acquisition is disabled.
module reflecto_daq_top
  import daq_pkg::*;
(
  input  logic                  rst_n,
  // ADC LVDS inputs
  input  logic                  dclk,
  input  logic [2*NUM_CH-1:0]   lane_rise,
  input  logic [2*NUM_CH-1:0]   lane_fall,
  input  logic                  fclk_rise,
  input  logic                  fclk_fall,
  input  logic                  fclk,
  // timing
  input  logic                  clk_ts,
  input  logic                  acq_trig,
  // logic clocks
  input  logic                  clk_ctrl,
  input  logic                  clk_spi,
  // serial programming port
  output logic                  spi_sclk,
  output logic                  spi_sdata,
  output logic [SPI_CS-1:0]     spi_cs_n,
  input  logic                  spi_sdo,
  // DMA core side
  input  logic                  clk_dma,
  output logic                  dma_valid,
  output logic [RD_W-1:0]       dma_data,
  output logic                  dma_last,
  input  logic                  dma_ready,
  output logic                  dma_done,
  input  logic                  t_req,
  input  logic                  t_we,
  input  logic [REG_AW-1:0]     t_addr,
  input  logic [REG_W-1:0]      t_wdata,
  output logic                  t_busy,
  output logic                  t_ack,
  output logic [REG_W-1:0]      t_rdata,
  // general-purpose lines to the interface board
  input  logic [EXT_IO-1:0]     ext_io_in,
  output logic [EXT_IO-1:0]     ext_io_out,
  output logic [EXT_IO-1:0]     ext_io_oe
);
  // ------------------------------------------------------------ resets
  logic rst_d, rst_f, rst_t, rst_c, rst_s, rst_m;
  rst_sync u_rs_d (.clk(dclk),     .rst_n_in(rst_n), .rst_n(rst_d));
  rst_sync u_rs_f (.clk(fclk),     .rst_n_in(rst_n), .rst_n(rst_f));
  rst_sync u_rs_t (.clk(clk_ts),   .rst_n_in(rst_n), .rst_n(rst_t));
  rst_sync u_rs_c (.clk(clk_ctrl), .rst_n_in(rst_n), .rst_n(rst_c));
  rst_sync u_rs_s (.clk(clk_spi),  .rst_n_in(rst_n), .rst_n(rst_s));
  rst_sync u_rs_m (.clk(clk_dma),  .rst_n_in(rst_n), .rst_n(rst_m));

  // ------------------------------------------------------------ control
  daq_cfg_t          cfg;
  spi_cmd_t          spi_cmd;
  logic              spi_start_c, status_clr_c, sw_trig_c;
  logic              reg_wr, reg_rd, reg_rvalid;
  logic [REG_AW-1:0] reg_addr;
  logic [REG_W-1:0]  reg_wdata, reg_rdata;
  logic [REG_W-1:0]  timers;
  logic [FRAME_TS_N*TS_W-1:0] frame_ts;
  logic [31:0]       spi_rdata;
  logic              lvds_locked, acq_busy, fifo_overflow, dma_busy, dma_overrun;
  logic              burst_done_c, missed_c, dma_done_c, spi_done_c;
  logic [7:0]        slip_count;

  slave_mgmt u_slave (
    .t_clk(clk_dma), .t_rst_n(rst_m), .t_req, .t_we, .t_addr, .t_wdata,
    .t_busy, .t_ack, .t_rdata,
    .clk(clk_ctrl), .rst_n(rst_c), .reg_wr, .reg_rd, .reg_addr, .reg_wdata,
    .reg_rdata, .reg_rvalid);

  main_ctrl u_ctrl (
    .clk(clk_ctrl), .rst_n(rst_c),
    .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata, .reg_rvalid,
    .cfg, .spi_cmd, .spi_start(spi_start_c), .status_clr(status_clr_c),
    .sw_trig(sw_trig_c), .ext_io_in, .ext_io_out, .ext_io_oe,
    .lvds_locked, .slip_count, .acq_busy, .fifo_overflow, .dma_busy, .dma_overrun,
    .burst_done_evt(burst_done_c), .missed_trig_evt(missed_c),
    .dma_done_evt(dma_done_c), .spi_done_evt(spi_done_c),
    .timers, .frame_ts, .spi_rdata);

  // ------------------------------------------------------ serial port
  logic spi_start_s, spi_done_s;
  pulse_sync u_ps_spi_go (.src_clk(clk_ctrl), .src_rst_n(rst_c), .src_pulse(spi_start_c),
                          .dst_clk(clk_spi), .dst_rst_n(rst_s), .dst_pulse(spi_start_s));
  serial_prog_if u_spi (
    .clk(clk_spi), .rst_n(rst_s), .start(spi_start_s), .cmd(spi_cmd),
    .busy(), .done(spi_done_s), .rdata(spi_rdata),
    .sclk(spi_sclk), .sdata(spi_sdata), .cs_n(spi_cs_n), .sdo(spi_sdo));
  pulse_sync u_ps_spi_done (.src_clk(clk_spi), .src_rst_n(rst_s), .src_pulse(spi_done_s),
                            .dst_clk(clk_ctrl), .dst_rst_n(rst_c), .dst_pulse(spi_done_c));

  // ----------------------------------------------------- LVDS receiver
  logic [NUM_CH*SAMPLE_W-1:0] sample_bus;
  logic                       sample_valid;
  adc_lvds_deser u_deser (
    .dclk, .dclk_rst_n(rst_d), .lane_rise, .lane_fall, .fclk_rise, .fclk_fall,
    .locked(lvds_locked), .slip_count,
    .fclk, .fclk_rst_n(rst_f), .sample_bus, .sample_valid);

  // ------------------------------------------------ buffering control
  logic            acq_en_f, trig_f, clr_f;
  logic            fifo_wr_en, fifo_full;
  logic [WR_W-1:0] fifo_wr_data;
  logic            frame_start_f, burst_start_f, burst_done_f, missed_f;
  logic            trig_t;

  bit_sync #(.W(1)) u_en_f (.clk(fclk), .rst_n(rst_f), .d(cfg.acq_enable), .q(acq_en_f));
  pulse_sync u_ps_trig (.src_clk(clk_ts), .src_rst_n(rst_t), .src_pulse(trig_t),
                        .dst_clk(fclk), .dst_rst_n(rst_f), .dst_pulse(trig_f));
  pulse_sync u_ps_clr_f (.src_clk(clk_ctrl), .src_rst_n(rst_c), .src_pulse(status_clr_c),
                         .dst_clk(fclk), .dst_rst_n(rst_f), .dst_pulse(clr_f));

  acq_buf_ctrl u_acq (
    .clk(fclk), .rst_n(rst_f), .acq_enable(acq_en_f),
    .frame_size(cfg.frame_size), .frames_per_burst(cfg.frames_per_burst),
    .clr(clr_f), .trig(trig_f), .sample_bus, .sample_valid,
    .fifo_wr_en, .fifo_wr_data, .fifo_full,
    .frame_start(frame_start_f), .burst_start(burst_start_f),
    .burst_done(burst_done_f), .missed_trig(missed_f),
    .busy(acq_busy), .overflow(fifo_overflow));

  // ------------------------------------------------------- burst FIFO
  logic            fifo_rd_en, fifo_rd_valid, fifo_empty;
  logic [RD_W-1:0] fifo_rd_data;
  async_fifo_asym #(.WR_W(WR_W), .RD_W(RD_W), .FIFO_BYTES(FIFO_BYTES)) u_fifo (
    .wr_clk(fclk), .wr_rst_n(rst_f), .wr_en(fifo_wr_en), .wr_data(fifo_wr_data),
    .full(fifo_full),
    .rd_clk(clk_dma), .rd_rst_n(rst_m), .rd_en(fifo_rd_en), .rd_data(fifo_rd_data),
    .rd_valid(fifo_rd_valid), .empty(fifo_empty));

  // ------------------------------------------------------ frame timer
  logic frame_start_t, burst_start_t, acq_stop_t, dma_stop_t, dma_start_t;
  pulse_sync u_ps_fs (.src_clk(fclk), .src_rst_n(rst_f), .src_pulse(frame_start_f),
                      .dst_clk(clk_ts), .dst_rst_n(rst_t), .dst_pulse(frame_start_t));
  pulse_sync u_ps_bs (.src_clk(fclk), .src_rst_n(rst_f), .src_pulse(burst_start_f),
                      .dst_clk(clk_ts), .dst_rst_n(rst_t), .dst_pulse(burst_start_t));
  pulse_sync u_ps_bd (.src_clk(fclk), .src_rst_n(rst_f), .src_pulse(burst_done_f),
                      .dst_clk(clk_ts), .dst_rst_n(rst_t), .dst_pulse(acq_stop_t));

  logic sw_trig_t;
  pulse_sync u_ps_sw (.src_clk(clk_ctrl), .src_rst_n(rst_c), .src_pulse(sw_trig_c),
                      .dst_clk(clk_ts), .dst_rst_n(rst_t), .dst_pulse(sw_trig_t));

  frame_timer u_timer (
    .clk(clk_ts), .rst_n(rst_t), .trig_ext(acq_trig), .trig_soft(sw_trig_t), .acq_enable(cfg.acq_enable),
    .trig_internal(cfg.trig_internal),
    .trig_frame_period(cfg.trig_frame_period), .trig_burst_period(cfg.trig_burst_period),
    .frames_per_burst(cfg.frames_per_burst), .dma_offset(cfg.dma_offset),
    .ts2_sel(cfg.ts2_sel),
    .frame_start_evt(frame_start_t), .burst_start_evt(burst_start_t),
    .acq_stop_evt(acq_stop_t), .dma_stop_evt(dma_stop_t),
    .trig_out(trig_t), .dma_start(dma_start_t), .timer(), .timers, .frame_ts);

  // ---------------------------------------------------- DMA management
  logic        dma_start_m, clr_m;
  logic [31:0] burst_words;
  assign burst_words = 32'(cfg.frame_size) * 32'(cfg.frames_per_burst) * (WR_W / RD_W);

  pulse_sync u_ps_ds (.src_clk(clk_ts), .src_rst_n(rst_t), .src_pulse(dma_start_t),
                      .dst_clk(clk_dma), .dst_rst_n(rst_m), .dst_pulse(dma_start_m));
  pulse_sync u_ps_clr_m (.src_clk(clk_ctrl), .src_rst_n(rst_c), .src_pulse(status_clr_c),
                         .dst_clk(clk_dma), .dst_rst_n(rst_m), .dst_pulse(clr_m));

  dma_mgmt #(.DW(RD_W)) u_dma (
    .clk(clk_dma), .rst_n(rst_m), .start(dma_start_m), .burst_words, .clr(clr_m),
    .fifo_rd_en, .fifo_rd_data, .fifo_rd_valid, .fifo_empty,
    .m_valid(dma_valid), .m_data(dma_data), .m_last(dma_last), .m_ready(dma_ready),
    .busy(dma_busy), .done(dma_done), .overrun(dma_overrun));

  pulse_sync u_ps_dd_t (.src_clk(clk_dma), .src_rst_n(rst_m), .src_pulse(dma_done),
                        .dst_clk(clk_ts), .dst_rst_n(rst_t), .dst_pulse(dma_stop_t));
  pulse_sync u_ps_dd_c (.src_clk(clk_dma), .src_rst_n(rst_m), .src_pulse(dma_done),
                        .dst_clk(clk_ctrl), .dst_rst_n(rst_c), .dst_pulse(dma_done_c));
  pulse_sync u_ps_bd_c (.src_clk(fclk), .src_rst_n(rst_f), .src_pulse(burst_done_f),
                        .dst_clk(clk_ctrl), .dst_rst_n(rst_c), .dst_pulse(burst_done_c));
  pulse_sync u_ps_mt_c (.src_clk(fclk), .src_rst_n(rst_f), .src_pulse(missed_f),
                        .dst_clk(clk_ctrl), .dst_rst_n(rst_c), .dst_pulse(missed_c));
endmodule
