// adc_lvds_model: behavioural model of the serial LVDS outputs of the two
// quad 12-bit ADC boards, as seen after the FPGA's DDR input registers.
// Not synthesisable; testbench use only.
//
// Sample n of channel c is the 12-bit value {c[2:0], n[8:0]}, so a receiver
// error in lane order, bit order or word alignment shows up at once. Each
// sample goes out on two lanes, even bits on lane 2c and odd bits on lane
// 2c+1, most significant first, two bits per dclk period (rising-edge bit,
// then falling-edge bit). The frame clock is sent as a seventh "lane" that
// is high for the first three bit times of each sample. `skew` delays the
// whole serial stream by that many bit times relative to the bit clock, to
// exercise the receiver's word alignment. Outputs change on the falling edge
// of dclk, ready for the receiver's rising edge.
module adc_lvds_model #(
  parameter int unsigned CH = 8
) (
  input  logic            dclk,
  input  logic [2:0]      skew,
  output logic [2*CH-1:0] lane_rise,
  output logic [2*CH-1:0] lane_fall,
  output logic            fclk_rise,
  output logic            fclk_fall
);
  longint unsigned bitpos = 64'd12;   // global bit-time counter

  function automatic logic [11:0] sample(input int c, input longint unsigned n);
    return {c[2:0], n[8:0]};
  endfunction

  // bit number k (0 = first) of lane l in stream bit time b
  function automatic logic lane_bit(input int l, input longint unsigned b);
    longint unsigned n, k;
    logic [11:0] s;
    n = b / 6;
    k = b % 6;
    s = sample(l / 2, n);
    // first bit is the MSB of that lane: bit 10 (even lane) or 11 (odd lane)
    return s[2 * (5 - int'(k)) + (l % 2)];
  endfunction

  function automatic logic frame_bit(input longint unsigned b);
    return (b % 6) < 3;
  endfunction

  always @(negedge dclk) begin
    longint unsigned b0, b1;
    b0 = bitpos - longint'(skew);
    b1 = b0 + 1;
    for (int l = 0; l < 2*CH; l++) begin
      lane_rise[l] = lane_bit(l, b0);
      lane_fall[l] = lane_bit(l, b1);
    end
    fclk_rise = frame_bit(b0);
    fclk_fall = frame_bit(b1);
    bitpos += 2;
  end

  initial begin
    lane_rise = '0; lane_fall = '0; fclk_rise = 1'b0; fclk_fall = 1'b0;
  end
endmodule
