// acq_buf_ctrl: acquisition data buffering control.
//
// The ADC clocks run all the time, so a new set of eight 12-bit samples
// arrives on every frame clock cycle. This block cuts that stream into frames
// of frame_size samples, each started by an acquisition trigger, and groups
// frames_per_burst frames into a burst (four 25 us microwave sweeps per 1 ms
// cycle in the reflectometer). Each sample set is zero-padded from 12 to 16
// bits per channel, channel c landing in bits [16c+11:16c] with the top four
// bits zero, and written to the burst FIFO as one 128-bit word.
//
// States: IDLE (acquisition disabled) -> WAIT_TRIG -> FRAME (one write per
// cycle for frame_size cycles) -> WAIT_TRIG ... until the last frame of the
// burst ends, which raises burst_done and waits for the next burst's first
// trigger. A trigger is only taken in WAIT_TRIG with the LVDS receiver
// locked; one arriving during a frame is counted by a missed_trig pulse. A
// write into a full FIFO is dropped and sets the sticky overflow flag,
// cleared by clr.
//
// Timing: the sample present on the cycle after the trigger pulse is the
// first of the frame; frame_start and (for a burst's first frame)
// burst_start pulse on the trigger cycle; burst_done pulses on the cycle
// after the last write. All signals are in the frame clock domain.
//
// Programmable frame size and frame count and the 12-to-16-bit padding
// follow the original system; the trigger, overflow and missed-trigger
// rules are this design's own.
module acq_buf_ctrl
  import daq_pkg::*;
#(
  parameter int unsigned CH = NUM_CH,
  parameter int unsigned SW = SAMPLE_W,
  parameter int unsigned PW = PAD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              acq_enable,
  input  logic [15:0]       frame_size,
  input  logic [7:0]        frames_per_burst,
  input  logic              clr,
  input  logic              trig,
  input  logic [CH*SW-1:0]  sample_bus,
  input  logic              sample_valid,
  output logic              fifo_wr_en,
  output logic [CH*PW-1:0]  fifo_wr_data,
  input  logic              fifo_full,
  output logic              frame_start,
  output logic              burst_start,
  output logic              burst_done,
  output logic              missed_trig,
  output logic              busy,
  output logic              overflow
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT_TRIG, S_FRAME} state_e;
  state_e      state;
  logic [15:0] sample_cnt;
  logic [7:0]  frame_cnt;

  logic [CH*PW-1:0] padded;
  always_comb
    for (int c = 0; c < CH; c++)
      padded[c*PW +: PW] = {{(PW-SW){1'b0}}, sample_bus[c*SW +: SW]};

  wire take_trig = (state == S_WAIT_TRIG) && trig && sample_valid;
  wire last_smp  = (sample_cnt == frame_size - 16'd1);

  assign frame_start = take_trig;
  assign burst_start = take_trig && (frame_cnt == 8'd0);
  assign missed_trig = trig && !take_trig && (state != S_IDLE);
  assign busy        = (state == S_FRAME) || (frame_cnt != 8'd0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state        <= S_IDLE;
      sample_cnt   <= '0;
      frame_cnt    <= '0;
      fifo_wr_en   <= 1'b0;
      fifo_wr_data <= '0;
      burst_done   <= 1'b0;
      overflow     <= 1'b0;
    end else begin
      fifo_wr_en <= 1'b0;
      burst_done <= 1'b0;
      if (clr) overflow <= 1'b0;
      unique case (state)
        S_IDLE: begin
          frame_cnt <= '0;
          if (acq_enable) state <= S_WAIT_TRIG;
        end
        S_WAIT_TRIG: begin
          if (!acq_enable) state <= S_IDLE;
          else if (take_trig) begin
            state      <= S_FRAME;
            sample_cnt <= '0;
          end
        end
        S_FRAME: begin
          if (fifo_full) overflow <= 1'b1;
          else begin
            fifo_wr_en   <= 1'b1;
            fifo_wr_data <= padded;
          end
          sample_cnt <= sample_cnt + 16'd1;
          if (last_smp) begin
            if (frame_cnt == frames_per_burst - 8'd1) begin
              frame_cnt  <= '0;
              burst_done <= 1'b1;
            end else begin
              frame_cnt <= frame_cnt + 8'd1;
            end
            state <= acq_enable ? S_WAIT_TRIG : S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
endmodule
