// tb_acq_buf_ctrl: self-checking test of the acquisition buffering control.
// A counting sample stream is driven on every clock; triggers start frames
// of FS samples and bursts of NF frames. The test checks each FIFO write
// against the padded sample expected from the trigger time, the number of
// writes, the frame_start / burst_start / burst_done pulses, missed triggers,
// triggers ignored while disabled or unlocked, and the overflow flag.
module tb_acq_buf_ctrl;
  localparam int CH = 8, FS = 16, NF = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic acq_enable = 1'b0, clr = 1'b0, trig = 1'b0, sample_valid = 1'b1, fifo_full = 1'b0;
  logic [CH*12-1:0] sample_bus;
  logic fifo_wr_en, frame_start, burst_start, burst_done, missed_trig, busy, overflow;
  logic [CH*16-1:0] fifo_wr_data;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  acq_buf_ctrl dut (.clk, .rst_n, .acq_enable, .frame_size(16'(FS)), .frames_per_burst(8'(NF)),
    .clr, .trig, .sample_bus, .sample_valid, .fifo_wr_en, .fifo_wr_data, .fifo_full,
    .frame_start, .burst_start, .burst_done, .missed_trig, .busy, .overflow);

  always #5ns clk = ~clk;

  function automatic logic [CH*12-1:0] smp(input int unsigned n);
    for (int c = 0; c < CH; c++) smp[c*12 +: 12] = {c[2:0], n[8:0]};
  endfunction
  function automatic logic [CH*16-1:0] padded(input int unsigned n);
    for (int c = 0; c < CH; c++) padded[c*16 +: 16] = {4'h0, c[2:0], n[8:0]};
  endfunction

  always_ff @(posedge clk) cyc <= cyc + 1;
  assign sample_bus = smp(cyc);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // expected write stream
  logic [CH*16-1:0] exp_q[$];
  int n_wr = 0, n_fs = 0, n_bs = 0, n_bd = 0, n_miss = 0;
  always @(posedge clk) if (rst_n) begin
    if (fifo_wr_en) begin
      n_wr++;
      if (exp_q.size() == 0) check(0, "unexpected write");
      else begin logic [CH*16-1:0] e; e = exp_q.pop_front(); check(fifo_wr_data == e, $sformatf("write data got %h exp %h", fifo_wr_data[15:0], e[15:0])); end
    end
    if (frame_start) n_fs++;
    if (burst_start) n_bs++;
    if (burst_done)  n_bd++;
    if (missed_trig) n_miss++;
  end

  // pulse the trigger for one cycle; if expect_frame, queue the frame
  task automatic fire(input bit expect_frame);
    @(negedge clk); trig = 1'b1;
    if (expect_frame)
      for (int i = 1; i <= FS; i++) exp_q.push_back(padded(cyc + i));
    @(negedge clk); trig = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // disabled: trigger ignored
    fire(0);
    repeat (5) @(posedge clk);
    check(n_fs == 0 && n_wr == 0, "no frame while disabled");
    acq_enable = 1'b1;
    repeat (3) @(posedge clk);
    // burst 1: NF frames
    for (int f = 0; f < NF; f++) begin
      fire(1);
      if (f == 1) begin repeat (4) @(posedge clk); fire(0); end   // during frame
      repeat (FS + 10) @(posedge clk);
    end
    check(n_wr == NF*FS, "writes in burst 1");
    check(n_fs == NF, "frame_start count");
    check(n_bs == 1, "one burst_start");
    check(n_bd == 1, "one burst_done");
    check(n_miss == 1, "missed trigger counted");
    check(!busy, "idle after burst");
    check(exp_q.size() == 0, "all frames written");
    // not locked: trigger ignored
    sample_valid = 1'b0;
    fire(0);
    repeat (5) @(posedge clk);
    check(n_fs == NF, "no frame while unlocked");
    sample_valid = 1'b1;
    // burst 2 with FIFO full for 5 cycles of the first frame
    fire(1);
    repeat (3) @(posedge clk);
    @(negedge clk) fifo_full = 1'b1;
    // samples written at the next 5 edges are lost
    begin
      int drop_first;
      drop_first = cyc;
      repeat (5) @(negedge clk);
      fifo_full = 1'b0;
      exp_q = exp_q.find(x) with (!(x[8:0] >= 9'(drop_first) && x[8:0] < 9'(drop_first + 5)));
    end
    repeat (FS + 5) @(posedge clk);
    check(overflow, "overflow flag set");
    check(n_bs == 2, "second burst started");
    for (int f = 1; f < NF; f++) begin fire(1); repeat (FS + 6) @(posedge clk); end
    check(n_bd == 2, "second burst done");
    check(exp_q.size() == 0, "second burst written");
    check(n_wr == 2*NF*FS - 5, "five writes dropped");
    @(negedge clk) clr = 1'b1; @(negedge clk) clr = 1'b0;
    check(!overflow, "overflow cleared");
    // disable between frames returns to idle
    acq_enable = 1'b0;
    repeat (3) @(posedge clk);
    fire(0);
    repeat (FS) @(posedge clk);
    check(n_fs == 2*NF, "no frame after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
