// pulse_sync: carries single-cycle event pulses from one clock domain to
// another.
//
// Each source pulse flips a toggle register; the destination passes the
// toggle through two flip-flops and emits one pulse for every change it sees.
// Source pulses must be at least three destination cycles apart, which holds
// for every event of this design (frame starts, burst ends, DMA start/stop
// and serial-port commands are microseconds apart).
// Latency: two to three destination clock cycles.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic       src_tog;
  logic [2:0] dst_sh;

  always_ff @(posedge src_clk or negedge src_rst_n)
    if (!src_rst_n)     src_tog <= 1'b0;
    else if (src_pulse) src_tog <= ~src_tog;

  always_ff @(posedge dst_clk or negedge dst_rst_n)
    if (!dst_rst_n) dst_sh <= '0;
    else            dst_sh <= {dst_sh[1:0], src_tog};

  assign dst_pulse = dst_sh[2] ^ dst_sh[1];
endmodule
