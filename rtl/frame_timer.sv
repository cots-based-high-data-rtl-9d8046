// frame_timer: frame timer, frame identifier counter and programmable
// trigger logic.
//
// Runs on the 200 MHz clock that the acquisition PLL derives from the same
// 10 MHz reference as the ADC sample clock and the central timing system, so
// the timer ticks in step with the incoming triggers (5 ns resolution).
//
// * timer: free-running 48-bit counter.
// * trigger selection: the external acquisition trigger (synchronised, rising
//   edge) or the internal generator; triggers are passed on (trig_out) only
//   while acquisition is enabled, and the timer value of each one is kept.
//   A software trigger (trig_soft, a pulse from the control registers) is
//   accepted in external mode as well, for tests without the timing system.
// * internal generator: a trigger at the start of every burst period and
//   then every frame period until frames_per_burst triggers were given
//   (the 4 x 35 us in 1 ms pattern of the reflectometer by default).
// * registers: when the acquisition logic reports that a trigger opened a
//   burst (burst_start_evt), the timestamp of that trigger and the number of
//   the burst's first frame are stored; a second timestamp records, as
//   chosen by ts2_sel, the DMA start, the end of the burst acquisition or
//   the end of the DMA transfer. The frame number counts accepted frames and
//   restarts at 0 when acquisition is enabled. timers = {frame id [127:96],
//   second timestamp [95:48], burst timestamp [47:0]}. The trigger
//   timestamps of the first FRAME_TS_N (4) frames of the burst are kept as
//   well (frame_ts), so every frame of the standard four-sweep burst has
//   its own time; frame k of the burst has frame number id + k.
// * DMA start: dma_offset ticks after the burst trigger, dma_start pulses
//   once, which lets the upload overlap the acquisition.
//
// All *_evt inputs are single-cycle pulses already in this clock domain.
//
// Timer width and rate, the burst timestamp, the three second-timestamp
// sources and the timed DMA start follow the original system; the form of
// the internal generator, the register packing and the 32-bit frame id are
// this design's choices.
module frame_timer
  import daq_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              trig_ext,          // asynchronous
  input  logic              trig_soft,         // pulse, this clock domain
  input  logic              acq_enable,        // asynchronous level
  input  logic              trig_internal,
  input  logic [31:0]       trig_frame_period,
  input  logic [31:0]       trig_burst_period,
  input  logic [7:0]        frames_per_burst,
  input  logic [31:0]       dma_offset,
  input  ts2_sel_e          ts2_sel,
  input  logic              frame_start_evt,
  input  logic              burst_start_evt,
  input  logic              acq_stop_evt,
  input  logic              dma_stop_evt,
  output logic              trig_out,
  output logic              dma_start,
  output logic [TS_W-1:0]   timer,
  output logic [REG_W-1:0]  timers,
  output logic [FRAME_TS_N*TS_W-1:0] frame_ts   // frame k of the burst at [k*TS_W +: TS_W]
);
  logic [TS_W-1:0]  trig_ts, ts1, ts2;
  logic [FID_W-1:0] frame_cnt, fid;

  // asynchronous inputs
  logic [1:0] s_in;
  bit_sync #(.W(2)) u_sync (.clk(clk), .rst_n(rst_n), .d({acq_enable, trig_ext}), .q(s_in));
  wire en = s_in[1];
  logic trig_ext_q, en_q;
  wire ext_edge = s_in[0] && !trig_ext_q;
  wire en_rise  = en && !en_q;

  // internal trigger generator
  logic [31:0] burst_tick, frame_tick;
  logic [7:0]  n_trig;
  logic        int_trig;
  wire gen_on = en && trig_internal;

  always_comb begin
    int_trig = 1'b0;
    if (gen_on) begin
      if (burst_tick == 32'd0)                                   int_trig = 1'b1;
      else if (n_trig < frames_per_burst &&
               frame_tick == trig_frame_period - 32'd1)          int_trig = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      burst_tick <= '0;
      frame_tick <= '0;
      n_trig     <= '0;
    end else if (!gen_on) begin
      burst_tick <= '0;
      frame_tick <= '0;
      n_trig     <= '0;
    end else begin
      burst_tick <= (burst_tick == trig_burst_period - 32'd1) ? '0 : burst_tick + 32'd1;
      frame_tick <= int_trig ? '0 : frame_tick + 32'd1;
      if (burst_tick == 32'd0) n_trig <= 8'd1;
      else if (int_trig)       n_trig <= n_trig + 8'd1;
    end

  wire trig_sel = en && (trig_internal ? int_trig : (ext_edge || trig_soft));

  // timer, timestamps, frame id, DMA start
  logic dma_armed;
  wire [TS_W-1:0] since_burst = timer - ts1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      timer      <= '0;
      trig_ext_q <= 1'b0;
      en_q       <= 1'b0;
      trig_out   <= 1'b0;
      trig_ts    <= '0;
      ts1        <= '0;
      ts2        <= '0;
      frame_cnt  <= '0;
      fid        <= '0;
      dma_armed  <= 1'b0;
      dma_start  <= 1'b0;
    end else begin
      timer      <= timer + 1'b1;
      trig_ext_q <= s_in[0];
      en_q       <= en;
      trig_out   <= trig_sel;
      dma_start  <= 1'b0;
      if (trig_sel) trig_ts <= timer;
      if (en_rise)  frame_cnt <= '0;
      else if (frame_start_evt) frame_cnt <= frame_cnt + 1'b1;
      if (burst_start_evt) begin
        ts1       <= trig_ts;
        fid       <= frame_cnt;
        dma_armed <= 1'b1;
      end else if (dma_armed && since_burst >= {16'd0, dma_offset}) begin
        dma_armed <= 1'b0;
        dma_start <= 1'b1;
      end
      unique case (ts2_sel)
        TS2_DMA_START: if (dma_start)    ts2 <= timer;
        TS2_ACQ_STOP:  if (acq_stop_evt) ts2 <= timer;
        TS2_DMA_STOP:  if (dma_stop_evt) ts2 <= timer;
        default: ;
      endcase
    end

  assign timers = {fid, ts2, ts1};

  // trigger timestamp of each of the first FRAME_TS_N frames of the burst;
  // the burst's first frame_start_evt comes with its burst_start_evt
  localparam int unsigned FIB_W = $clog2(FRAME_TS_N + 1);
  logic [FIB_W-1:0] fib;   // frames of this burst stamped so far

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      fib      <= '0;
      frame_ts <= '0;
    end else if (frame_start_evt) begin
      if (burst_start_evt) begin
        frame_ts           <= '0;
        frame_ts[0 +: TS_W] <= trig_ts;
        fib                <= FIB_W'(1);
      end else if (32'(fib) < FRAME_TS_N) begin
        frame_ts[fib*TS_W +: TS_W] <= trig_ts;
        fib                        <= fib + 1'b1;
      end
    end
endmodule
