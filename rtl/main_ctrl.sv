// main_ctrl: main control logic and its register file.
//
// Runs on the 100 MHz logic clock. The host reaches the registers through
// the slave management bridge over a simple bus: a one-cycle reg_wr or reg_rd
// strobe with an address; read data is returned with reg_rvalid on the next
// cycle. Registers are 128 bits wide (the width of the bridge); most use only
// their low bits. Map (see daq_pkg):
//
//   0 CTRL        [0] acquisition enable, [1] internal trigger,
//                 [2] write 1: software trigger,
//                 [5:4] second timestamp source, [8] write 1: clear status
//   1 FRAME_SIZE  samples per frame          (reset 2048)
//   2 FRAMES      frames per burst           (reset 4)
//   3 TRIG_FRAME  internal trigger spacing, 5 ns ticks (reset 7000 = 35 us)
//   4 TRIG_BURST  internal burst period, 5 ns ticks (reset 200000 = 1 ms)
//   5 DMA_OFFSET  DMA start after the burst trigger, 5 ns ticks
//   6 SPI_CMD     [31:0] word, [36:32] length-1, [42:40] device; a write
//                 starts a serial transfer
//   7 STATUS      [0] LVDS locked, [1] acquisition busy, [2] FIFO overflow,
//                 [3] DMA busy, [4] DMA overrun, [5] serial port busy,
//                 [15:8] LVDS word-alignment moves,
//                 [31:16] bursts acquired, [47:32] missed triggers,
//                 [63:48] DMA transfers done
//   8 TIMERS      {frame id, second timestamp, burst timestamp}
//   9 SPI_RDATA   word received during the last serial transfer
//  10 SCRATCH     free read/write register
//  11 EXT_IO      general-purpose lines to the interface board:
//                 [1:0] output levels, [3:2] output enables,
//                 [5:4] levels read back from the pins (read only)
//  12 FRAME_TS01  trigger timestamps of frames 0 [47:0] and 1 [95:48]
//  13 FRAME_TS23  trigger timestamps of frames 2 [47:0] and 3 [95:48]
//                 of the last burst (0 for frames the burst did not have)
//
// Status flags from other clock domains pass through two-flop synchronisers;
// event pulses arrive already synchronised and are counted here. The timer
// register and the serial read word are sampled through synchronisers as
// well: they change only on events microseconds apart, so a read sees a
// settled value. The configuration outputs are meant to be changed only
// while acquisition is disabled. The register map is this design's own.
module main_ctrl
  import daq_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // register bus
  input  logic              reg_wr,
  input  logic              reg_rd,
  input  logic [REG_AW-1:0] reg_addr,
  input  logic [REG_W-1:0]  reg_wdata,
  output logic [REG_W-1:0]  reg_rdata,
  output logic              reg_rvalid,
  // configuration and commands
  output daq_cfg_t          cfg,
  output spi_cmd_t          spi_cmd,
  output logic              spi_start,
  output logic              status_clr,
  output logic              sw_trig,
  // general-purpose lines: pin levels (asynchronous), drive and enable
  input  logic [EXT_IO-1:0] ext_io_in,
  output logic [EXT_IO-1:0] ext_io_out,
  output logic [EXT_IO-1:0] ext_io_oe,
  // status (asynchronous levels)
  input  logic              lvds_locked,
  input  logic [7:0]        slip_count,
  input  logic              acq_busy,
  input  logic              fifo_overflow,
  input  logic              dma_busy,
  input  logic              dma_overrun,
  // events, already in this clock domain
  input  logic              burst_done_evt,
  input  logic              missed_trig_evt,
  input  logic              dma_done_evt,
  input  logic              spi_done_evt,
  // slowly changing data from other domains
  input  logic [REG_W-1:0]  timers,
  input  logic [FRAME_TS_N*TS_W-1:0] frame_ts,
  input  logic [31:0]       spi_rdata
);
  logic [REG_W-1:0] scratch;
  logic [15:0]      n_burst, n_missed, n_dma;
  logic             spi_busy;
  logic [4:0]       st;
  logic [REG_W-1:0] timers_s;
  logic [31:0]      spi_rdata_s;
  logic [7:0]       slip_s;
  logic [EXT_IO-1:0] ext_in_s;
  logic [FRAME_TS_N*TS_W-1:0] frame_ts_s;

  bit_sync #(.W(5)) u_st (.clk(clk), .rst_n(rst_n),
    .d({dma_overrun, dma_busy, fifo_overflow, acq_busy, lvds_locked}), .q(st));
  bit_sync #(.W(REG_W)) u_tm (.clk(clk), .rst_n(rst_n), .d(timers), .q(timers_s));
  bit_sync #(.W(FRAME_TS_N*TS_W)) u_fts (.clk(clk), .rst_n(rst_n), .d(frame_ts), .q(frame_ts_s));
  bit_sync #(.W(8)) u_sl (.clk(clk), .rst_n(rst_n), .d(slip_count), .q(slip_s));
  bit_sync #(.W(EXT_IO)) u_io (.clk(clk), .rst_n(rst_n), .d(ext_io_in), .q(ext_in_s));
  bit_sync #(.W(32)) u_sr (.clk(clk), .rst_n(rst_n), .d(spi_rdata), .q(spi_rdata_s));

  wire wr_ctrl = reg_wr && (reg_addr == REG_CTRL);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cfg.acq_enable        <= 1'b0;
      cfg.trig_internal     <= 1'b0;
      cfg.ts2_sel           <= TS2_DMA_START;
      cfg.frame_size        <= DEF_FRAME_SIZE;
      cfg.frames_per_burst  <= DEF_FRAMES;
      cfg.trig_frame_period <= DEF_TRIG_FRAME;
      cfg.trig_burst_period <= DEF_TRIG_BURST;
      cfg.dma_offset        <= DEF_DMA_OFFSET;
      spi_cmd               <= '0;
      spi_start             <= 1'b0;
      status_clr            <= 1'b0;
      sw_trig               <= 1'b0;
      ext_io_out            <= '0;
      ext_io_oe             <= '0;
      scratch               <= '0;
    end else begin
      spi_start  <= 1'b0;
      status_clr <= wr_ctrl && reg_wdata[8];
      sw_trig    <= wr_ctrl && reg_wdata[2];
      if (reg_wr) begin
        unique case (reg_addr)
          REG_CTRL: begin
            cfg.acq_enable    <= reg_wdata[0];
            cfg.trig_internal <= reg_wdata[1];
            cfg.ts2_sel       <= ts2_sel_e'(reg_wdata[5:4]);
          end
          REG_FRAME_SIZE: cfg.frame_size        <= reg_wdata[15:0];
          REG_FRAMES:     cfg.frames_per_burst  <= reg_wdata[7:0];
          REG_TRIG_FRAME: cfg.trig_frame_period <= reg_wdata[31:0];
          REG_TRIG_BURST: cfg.trig_burst_period <= reg_wdata[31:0];
          REG_DMA_OFFSET: cfg.dma_offset        <= reg_wdata[31:0];
          REG_SPI_CMD: begin
            spi_cmd   <= reg_wdata[$bits(spi_cmd_t)-1:0];
            spi_start <= 1'b1;
          end
          REG_SCRATCH:    scratch <= reg_wdata;
          REG_EXT_IO: begin
            ext_io_out <= reg_wdata[EXT_IO-1:0];
            ext_io_oe  <= reg_wdata[2*EXT_IO-1:EXT_IO];
          end
          default: ;
        endcase
      end
    end

  // event counters and the serial-port busy flag
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      n_burst  <= '0;
      n_missed <= '0;
      n_dma    <= '0;
      spi_busy <= 1'b0;
    end else begin
      if (status_clr) begin
        n_burst  <= '0;
        n_missed <= '0;
        n_dma    <= '0;
      end else begin
        if (burst_done_evt)  n_burst  <= n_burst  + 16'd1;
        if (missed_trig_evt) n_missed <= n_missed + 16'd1;
        if (dma_done_evt)    n_dma    <= n_dma    + 16'd1;
      end
      if (spi_start)         spi_busy <= 1'b1;
      else if (spi_done_evt) spi_busy <= 1'b0;
    end

  // read port
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      reg_rdata  <= '0;
      reg_rvalid <= 1'b0;
    end else begin
      reg_rvalid <= reg_rd;
      if (reg_rd) begin
        reg_rdata <= '0;
        unique case (reg_addr)
          REG_CTRL:       reg_rdata[5:0] <= {cfg.ts2_sel, 2'b00, cfg.trig_internal, cfg.acq_enable};
          REG_FRAME_SIZE: reg_rdata[15:0] <= cfg.frame_size;
          REG_FRAMES:     reg_rdata[7:0]  <= cfg.frames_per_burst;
          REG_TRIG_FRAME: reg_rdata[31:0] <= cfg.trig_frame_period;
          REG_TRIG_BURST: reg_rdata[31:0] <= cfg.trig_burst_period;
          REG_DMA_OFFSET: reg_rdata[31:0] <= cfg.dma_offset;
          REG_SPI_CMD:    reg_rdata[$bits(spi_cmd_t)-1:0] <= spi_cmd;
          REG_STATUS:     reg_rdata[63:0] <= {n_dma, n_missed, n_burst, slip_s, 2'd0, spi_busy, st};
          REG_TIMERS:     reg_rdata <= timers_s;
          REG_SPI_RDATA:  reg_rdata[31:0] <= spi_rdata_s;
          REG_SCRATCH:    reg_rdata <= scratch;
          REG_EXT_IO:     reg_rdata[3*EXT_IO-1:0] <= {ext_in_s, ext_io_oe, ext_io_out};
          REG_FRAME_TS01: reg_rdata[2*TS_W-1:0] <= frame_ts_s[0      +: 2*TS_W];
          REG_FRAME_TS23: reg_rdata[2*TS_W-1:0] <= frame_ts_s[2*TS_W +: 2*TS_W];
          default: ;
        endcase
      end
    end

  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(reg_wr && reg_rd));
endmodule
