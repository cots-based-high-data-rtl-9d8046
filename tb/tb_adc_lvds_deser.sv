// tb_adc_lvds_deser: self-checking test of the LVDS receiver.
// For every stream skew of 0..5 bit times the receiver is reset, must lock
// within a bounded number of frames, and must then deliver on every frame
// clock a sample set in which channel c carries its own tag in bits [11:9]
// and the sample counter in bits [8:0] advances by exactly one per frame
// clock. A skew change without reset must make it lose lock and realign.
module tb_adc_lvds_deser;
  localparam int CH = 8;
  localparam int TD = 3000;    // dclk period, ps (3 x fclk)

  logic dclk = 1'b0, fclk = 1'b0, rst_n = 1'b0;
  logic [2:0] skew = '0;
  logic [2*CH-1:0] lane_rise, lane_fall;
  logic fclk_rise, fclk_fall, locked, sample_valid;
  logic [7:0] slip_count;
  logic [CH*12-1:0] sample_bus;
  int checks = 0, failures = 0;

  adc_lvds_model #(.CH(CH)) u_adc (.dclk, .skew, .lane_rise, .lane_fall, .fclk_rise, .fclk_fall);
  adc_lvds_deser #(.CH(CH)) dut (
    .dclk, .dclk_rst_n(rst_n), .lane_rise, .lane_fall, .fclk_rise, .fclk_fall,
    .locked, .slip_count, .fclk, .fclk_rst_n(rst_n), .sample_bus, .sample_valid);

  always #(TD/2 * 1ps) dclk = ~dclk;
  initial begin
    #(TD/4 * 1ps);
    forever begin fclk = 1'b1; #(3*TD/2 * 1ps); fclk = 1'b0; #(3*TD/2 * 1ps); end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // check n consecutive sample sets
  task automatic check_stream(input int n);
    logic [8:0] prev;
    bit first = 1;
    repeat (n) begin
      @(posedge fclk); #1ps;
      if (sample_valid) begin
        bit ok = 1;
        for (int c = 0; c < CH; c++) begin
          if (sample_bus[c*12+9 +: 3] != c[2:0]) ok = 0;
          if (sample_bus[c*12 +: 9] != sample_bus[8:0]) ok = 0;
        end
        check(ok, "channel tags / common counter");
        if (!first) check(sample_bus[8:0] == prev + 9'd1, "counter step");
        prev = sample_bus[8:0];
        first = 0;
      end
    end
    check(!first, "valid samples seen");
  endtask

  initial begin
    for (int s = 0; s < 6; s++) begin
      rst_n = 1'b0;
      skew = 3'(s);
      repeat (4) @(posedge dclk);
      rst_n = 1'b1;
      repeat (120) @(posedge dclk);   // 6 alignment steps plus lock count
      check(locked, $sformatf("locked with skew %0d", s));
      check_stream(50);
    end
    // realignment without reset
    @(negedge dclk) skew = 3'd1;
    repeat (3) @(posedge dclk);
    repeat (12) @(posedge dclk);
    begin
      bit lost = 0;
      int c0;
      c0 = slip_count;
      repeat (120) @(posedge dclk) if (!locked) lost = 1;
      check(slip_count != 8'(c0) || lost, "skew change forced realignment");
    end
    check(locked, "relocked after skew change");
    check_stream(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(200000 * TD * 1ps);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
