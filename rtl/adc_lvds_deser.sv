// adc_lvds_deser: ADC serial LVDS receiver.
//
// Every channel of the quad ADC boards sends its 12-bit samples over two DDR
// LVDS lanes, six bits per lane per sample, together with a bit clock (dclk,
// up to 300 MHz) and a frame clock (fclk, one period per sample, up to
// 100 MHz). The input DDR registers of the FPGA are outside this module: for
// each lane it receives the bit taken on the rising dclk edge (*_rise, first
// in time) and the one taken on the falling edge (*_fall).
//
// Word alignment: the frame clock is also sampled as if it were a data lane.
// Every SAMPLE_W/4 dclk cycles the last six bits of each lane are captured;
// the frame clock's six bits must read 111000 (high for the first half of a
// sample). While they do not, the capture point is moved by one bit: first
// by taking the word one bit older, then by delaying the capture phase one
// dclk cycle, which together reach all six positions. LOCK_COUNT correct
// frame words in a row declare lock; any wrong one drops it and restarts the
// search.
//
// Bit order: lane 2c carries the even bits of channel c and lane 2c+1 the
// odd bits, most significant first (two-wire mode of common quad ADCs); this
// order is an assumption.
//
// Outputs: the 96-bit sample bus (channel c in bits [12c+11:12c]) is
// re-registered on fclk, one new sample set per fclk cycle, with
// sample_valid = lock seen through a two-stage synchroniser. The dclk-side
// capture register holds each word for a whole frame, so the fclk register
// always samples a settled value when fclk and dclk come from the same ADC.
// Latency from last bit to sample_bus: one dclk cycle plus up to one fclk
// cycle.
module adc_lvds_deser
  import daq_pkg::*;
#(
  parameter int unsigned CH         = NUM_CH,
  parameter int unsigned SW         = SAMPLE_W,
  parameter int unsigned LOCK_COUNT = 4
) (
  input  logic              dclk,
  input  logic              dclk_rst_n,
  input  logic [2*CH-1:0]   lane_rise,
  input  logic [2*CH-1:0]   lane_fall,
  input  logic              fclk_rise,
  input  logic              fclk_fall,
  output logic              locked,         // dclk domain
  output logic [7:0]        slip_count,     // dclk domain, alignment moves
  input  logic              fclk,
  input  logic              fclk_rst_n,
  output logic [CH*SW-1:0]  sample_bus,     // fclk domain
  output logic              sample_valid    // fclk domain
);
  localparam int unsigned BPL = SW / 2;      // bits per lane per sample
  localparam int unsigned NPH = BPL / 2;     // dclk cycles per sample
  localparam logic [BPL-1:0] FCLK_PATTERN = {{(BPL/2){1'b1}}, {(BPL/2){1'b0}}};

  // shift histories: oldest bit at the top
  logic [BPL:0]            hist [2*CH];
  logic [BPL:0]            fhist;
  logic [$clog2(NPH)-1:0]  ph;
  logic                    ofs;             // take the word one bit older
  logic [$clog2(LOCK_COUNT+1)-1:0] good_cnt;
  logic [CH*SW-1:0]        word_q;

  function automatic logic [BPL-1:0] pick(input logic [BPL:0] h, input logic o);
    return o ? h[BPL:1] : h[BPL-1:0];
  endfunction

  always_ff @(posedge dclk or negedge dclk_rst_n)
    if (!dclk_rst_n) begin
      for (int l = 0; l < 2*CH; l++) hist[l] <= '0;
      fhist <= '0;
    end else begin
      for (int l = 0; l < 2*CH; l++) hist[l] <= {hist[l][BPL-2:0], lane_rise[l], lane_fall[l]};
      fhist <= {fhist[BPL-2:0], fclk_rise, fclk_fall};
    end

  // rebuild the channel samples from the current histories
  logic [CH*SW-1:0] word_d;
  always_comb begin
    word_d = '0;
    for (int c = 0; c < CH; c++) begin
      logic [BPL-1:0] ev, od;
      ev = pick(hist[2*c],   ofs);
      od = pick(hist[2*c+1], ofs);
      for (int k = 0; k < BPL; k++) begin
        word_d[c*SW + 2*k]     = ev[k];
        word_d[c*SW + 2*k + 1] = od[k];
      end
    end
  end

  wire capture  = (ph == NPH[$clog2(NPH)-1:0] - 1'b1);
  wire frame_ok = (pick(fhist, ofs) == FCLK_PATTERN);

  always_ff @(posedge dclk or negedge dclk_rst_n)
    if (!dclk_rst_n) begin
      ph         <= '0;
      ofs        <= 1'b0;
      good_cnt   <= '0;
      locked     <= 1'b0;
      slip_count <= '0;
      word_q     <= '0;
    end else begin
      ph <= capture ? '0 : ph + 1'b1;
      if (capture) begin
        word_q <= word_d;
        if (frame_ok) begin
          if (good_cnt == LOCK_COUNT[$bits(good_cnt)-1:0]) locked <= 1'b1;
          else                                            good_cnt <= good_cnt + 1'b1;
        end else begin
          locked     <= 1'b0;
          good_cnt   <= '0;
          slip_count <= slip_count + 1'b1;
          ofs        <= ~ofs;
          if (ofs) ph <= ph;   // one-cycle phase slip after both offsets tried
        end
      end
    end

  // frame clock domain
  logic lock_f;
  bit_sync #(.W(1)) u_lock_sync (.clk(fclk), .rst_n(fclk_rst_n), .d(locked), .q(lock_f));

  always_ff @(posedge fclk or negedge fclk_rst_n)
    if (!fclk_rst_n) begin
      sample_bus   <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_bus   <= word_q;
      sample_valid <= lock_f;
    end

  initial assert (SW % 4 == 0) else $error("SW must be a multiple of 4");
endmodule
