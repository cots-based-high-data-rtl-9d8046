// daq_pkg: constants, register map and configuration types shared by the
// acquisition firmware.
//
// The sizes follow the acquisition board: eight synchronously sampled 12-bit
// channels, each padded to 16 bits so that one time slice of all channels is
// a 128-bit word, a 128 KiB burst buffer read 64 bits at a time, a 48-bit
// frame timer and a 128-bit timer/identifier register. The register map, the
// 32-bit frame identifier and the default trigger periods are this design's
// own choices.
package daq_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NUM_CH      = 8;    // acquisition channels
  localparam int unsigned SAMPLE_W    = 12;   // ADC resolution
  localparam int unsigned PAD_W       = 16;   // padded sample width
  localparam int unsigned LANES_PER_CH = 2;   // serial LVDS lanes per channel
  localparam int unsigned SAMPLE_BUS_W = NUM_CH * SAMPLE_W;  // 96
  localparam int unsigned WR_W        = NUM_CH * PAD_W;      // 128
  localparam int unsigned RD_W        = 64;
  localparam int unsigned FIFO_BYTES  = 128 * 1024;
  localparam int unsigned TS_W        = 48;   // frame timer width
  localparam int unsigned FID_W       = 32;   // frame identifier width
  localparam int unsigned FRAME_TS_N  = 4;    // frames per burst with their own timestamp
                                              // (registers FRAME_TS01/23 hold exactly four)
  localparam int unsigned REG_W       = 128;  // control register width
  localparam int unsigned REG_AW      = 4;    // register index width
  localparam int unsigned EXT_IO      = 2;    // general-purpose lines (Ext. in/out I, II)
  localparam int unsigned SPI_CS      = 5;    // 4 ADC boards + acquisition PLL

  // ------------------------------------------------------- register map
  typedef enum logic [REG_AW-1:0] {
    REG_CTRL        = 4'd0,   // rw  control bits
    REG_FRAME_SIZE  = 4'd1,   // rw  samples per frame
    REG_FRAMES      = 4'd2,   // rw  frames per burst
    REG_TRIG_FRAME  = 4'd3,   // rw  internal trigger: ticks between frame triggers
    REG_TRIG_BURST  = 4'd4,   // rw  internal trigger: ticks between bursts
    REG_DMA_OFFSET  = 4'd5,   // rw  DMA start, ticks after the burst trigger
    REG_SPI_CMD     = 4'd6,   // rw  serial word; a write starts a transfer
    REG_STATUS      = 4'd7,   // ro  status flags and counters
    REG_TIMERS      = 4'd8,   // ro  {frame id, second timestamp, burst timestamp}
    REG_SPI_RDATA   = 4'd9,   // ro  word shifted in during the last transfer
    REG_SCRATCH     = 4'd10,  // rw  free register for bus tests
    REG_EXT_IO      = 4'd11,  // rw  general-purpose lines to the interface board
    REG_FRAME_TS01  = 4'd12,  // ro  trigger timestamps of frames 0 and 1 of the burst
    REG_FRAME_TS23  = 4'd13   // ro  trigger timestamps of frames 2 and 3 of the burst
  } reg_addr_e;

  // Which event the second timestamp register records.
  typedef enum logic [1:0] {
    TS2_DMA_START = 2'd0,
    TS2_ACQ_STOP  = 2'd1,
    TS2_DMA_STOP  = 2'd2
  } ts2_sel_e;

  // Configuration distributed by the main control logic. All fields except
  // acq_enable are meant to be changed only while acquisition is disabled.
  typedef struct packed {
    logic            acq_enable;      // CTRL[0]
    logic            trig_internal;   // CTRL[1]  1: internal trigger generator
    ts2_sel_e        ts2_sel;         // CTRL[5:4]
    logic [15:0]     frame_size;      // samples per frame
    logic [7:0]      frames_per_burst;
    logic [31:0]     trig_frame_period;
    logic [31:0]     trig_burst_period;
    logic [31:0]     dma_offset;
  } daq_cfg_t;

  // Serial programming command held in REG_SPI_CMD.
  typedef struct packed {
    logic [2:0]      cs_sel;   // [42:40] device: 0..3 ADC boards, 4 PLL
    logic [2:0]      rsvd;     // [39:37] unused
    logic [4:0]      len_m1;   // [36:32] word length minus one
    logic [31:0]     data;     // [31:0]  word, sent MSB first
  } spi_cmd_t;

  // Reset values of the configuration: 2048-sample frames, 4 frames per
  // burst, internal triggers every 35 us inside a 1 ms burst period on the
  // 200 MHz timer.
  localparam logic [15:0] DEF_FRAME_SIZE  = 16'd2048;
  localparam logic [7:0]  DEF_FRAMES      = 8'd4;
  localparam logic [31:0] DEF_TRIG_FRAME  = 32'd7000;
  localparam logic [31:0] DEF_TRIG_BURST  = 32'd200000;
  localparam logic [31:0] DEF_DMA_OFFSET  = 32'd0;

endpackage
