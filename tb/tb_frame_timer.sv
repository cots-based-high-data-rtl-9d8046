// tb_frame_timer: self-checking test of the frame timer, trigger logic,
// timestamp registers and timed DMA start (200 MHz clock).
// The acquisition side is emulated: every trigger becomes a frame_start
// event three clocks later, and every fourth one also a burst_start.
// Checks: timer rate; internal trigger spacing (frame period inside a burst,
// burst period between bursts, frames_per_burst triggers per burst); the
// burst timestamp equals the timer value at the burst's first trigger; the
// frame id of each burst; DMA start exactly dma_offset ticks after the burst
// trigger; the three sources of the second timestamp; external trigger edge
// detection and gating by the enable; the software trigger; the per-frame
// trigger timestamps of a burst.
module tb_frame_timer;
  import daq_pkg::*;
  localparam int FP = 20, BP = 200, NF = 4, OFS = 50;
  logic clk = 1'b0, rst_n = 1'b0;
  logic trig_ext = 1'b0, trig_soft = 1'b0, acq_enable = 1'b0, trig_internal = 1'b1;
  ts2_sel_e ts2_sel = TS2_DMA_START;
  logic frame_start_evt, burst_start_evt;
  logic acq_stop_evt = 1'b0, dma_stop_evt = 1'b0;
  logic trig_out, dma_start;
  logic [47:0] timer;
  logic [127:0] timers;
  logic [FRAME_TS_N*48-1:0] frame_ts;
  int checks = 0, failures = 0;

  frame_timer dut (.clk, .rst_n, .trig_ext, .trig_soft, .acq_enable, .trig_internal,
    .trig_frame_period(32'(FP)), .trig_burst_period(32'(BP)), .frames_per_burst(8'(NF)),
    .dma_offset(32'(OFS)), .ts2_sel, .frame_start_evt, .burst_start_evt, .acq_stop_evt,
    .dma_stop_evt, .trig_out, .dma_start, .timer, .timers, .frame_ts);

  always #2.5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // emulated acquisition: events three clocks after each trigger
  logic [47:0] trig_times[$];
  int n_trig = 0;
  logic [2:0] d_fs = '0, d_bs = '0;
  always @(posedge clk) if (rst_n) begin
    d_fs <= {d_fs[1:0], trig_out};
    d_bs <= {d_bs[1:0], trig_out && (n_trig % NF == 0)};
    if (trig_out) begin
      trig_times.push_back(timer - 48'd1);
      n_trig++;
    end
  end
  assign frame_start_evt = d_fs[2];
  assign burst_start_evt = d_bs[2];

  logic [47:0] dma_times[$];
  always @(posedge clk) if (rst_n && dma_start) dma_times.push_back(timer);

  initial begin
    logic [47:0] t0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); t0 = timer;
    repeat (100) @(posedge clk);
    check(timer - t0 == 48'd100, "timer counts one per clock");
    // ---------------- internal triggers, two and a half bursts
    repeat (20) @(posedge clk);
    check(n_trig == 0, "no trigger while disabled");
    acq_enable = 1'b1;
    repeat (2 * BP + 100) @(posedge clk);
    check(n_trig == 3 * NF, $sformatf("%0d triggers in 2.5 bursts", n_trig));
    for (int i = 1; i < trig_times.size(); i++) begin
      int gap;
      gap = int'(trig_times[i] - trig_times[i-1]);
      if (i % NF == 0) check(gap == BP - (NF - 1) * FP, $sformatf("burst spacing %0d", gap));
      else             check(gap == FP, $sformatf("frame spacing %0d", gap));
    end
    check(timers[47:0] == trig_times[2*NF], "burst timestamp = first trigger of burst");
    check(timers[127:96] == 32'(2 * NF), "frame id of third burst");
    for (int k = 0; k < FRAME_TS_N; k++)
      check(frame_ts[k*48 +: 48] == trig_times[2*NF + k], $sformatf("timestamp of frame %0d of the burst", k));
    check(dma_times.size() == 3, "one DMA start per burst");
    for (int b = 0; b < dma_times.size(); b++)
      check(dma_times[b] - 48'd1 - trig_times[b*NF] == 48'(OFS), "DMA start offset");
    check(timers[95:48] == dma_times[2], "second timestamp = DMA start");
    acq_enable = 1'b0;
    repeat (BP) @(posedge clk);
    // ---------------- second timestamp sources
    ts2_sel = TS2_ACQ_STOP;
    @(negedge clk) acq_stop_evt = 1'b1; t0 = timer;
    @(negedge clk) acq_stop_evt = 1'b0;
    @(posedge clk) #1ps;
    check(timers[95:48] == t0, "second timestamp = acquisition stop");
    ts2_sel = TS2_DMA_STOP;
    repeat (7) @(posedge clk);
    @(negedge clk) dma_stop_evt = 1'b1; t0 = timer;
    @(negedge clk) dma_stop_evt = 1'b0;
    @(posedge clk) #1ps;
    check(timers[95:48] == t0, "second timestamp = DMA stop");
    // ---------------- external trigger
    trig_internal = 1'b0;
    n_trig = 0; trig_times.delete();
    @(negedge clk) trig_ext = 1'b1;
    repeat (10) @(negedge clk);
    trig_ext = 1'b0;
    repeat (10) @(posedge clk);
    check(n_trig == 0, "external trigger gated while disabled");
    acq_enable = 1'b1;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 5; k++) begin
      @(negedge clk) trig_ext = 1'b1;
      repeat (8) @(negedge clk);
      trig_ext = 1'b0;
      repeat (30) @(negedge clk);
    end
    repeat (10) @(posedge clk);
    check(n_trig == 5, $sformatf("one trigger per external edge (%0d)", n_trig));
    check(trig_times[1] - trig_times[0] == 48'd39, "external trigger spacing");
    check(timers[127:96] == 32'd4, "frame id restarts at enable (5th frame of run)");
    check(timers[47:0] == trig_times[4], "burst timestamp from external trigger");
    check(frame_ts == {144'd0, trig_times[4]}, "new burst clears the later frame timestamps");
    // ---------------- software trigger: one pulse, one trigger
    @(negedge clk) trig_soft = 1'b1; t0 = timer;
    @(negedge clk) trig_soft = 1'b0;
    repeat (10) @(posedge clk);
    check(n_trig == 6, $sformatf("software trigger accepted (%0d)", n_trig));
    check(trig_times[5] == t0, "software trigger timestamp");
    acq_enable = 1'b0;
    repeat (5) @(posedge clk);
    @(negedge clk) trig_soft = 1'b1;
    @(negedge clk) trig_soft = 1'b0;
    repeat (10) @(posedge clk);
    check(n_trig == 6, "software trigger gated while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
