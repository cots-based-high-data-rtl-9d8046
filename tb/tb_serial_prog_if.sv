// tb_serial_prog_if: self-checking test of the serial programming port.
// A device model per select line shifts in sdata on rising sclk edges
// while its select is low and drives sdo with a known response word. For
// word lengths of 16, 24 and 32 bits and every device select, the test
// checks the word received, that only the chosen select went low, the bit
// count, the idle-low clock, the read-back word and busy/done timing
// (2 clocks per bit at half the module clock).
module tb_serial_prog_if;
  import daq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  spi_cmd_t cmd = '0;
  logic busy, done, sclk, sdata, sdo;
  logic [31:0] rdata;
  logic [SPI_CS-1:0] cs_n;
  int checks = 0, failures = 0;

  serial_prog_if dut (.clk, .rst_n, .start, .cmd, .busy, .done, .rdata, .sclk, .sdata, .cs_n, .sdo);

  always #25ns clk = ~clk;   // 20 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // device model
  logic [31:0] rx;
  int nbits;
  logic [31:0] resp;
  logic [SPI_CS-1:0] seen_sel;
  int nbit_tx;
  always @(posedge sclk) if (cs_n != '1) begin
    rx = {rx[30:0], sdata};
    nbits++;
  end
  // response: MSB first, changed on falling edge
  always @(negedge sclk) if (cs_n != '1) begin
    nbit_tx++;
    sdo = resp[31 - nbit_tx];
  end
  always @(negedge (&cs_n)) begin nbit_tx = 0; sdo = resp[31]; end
  int cyc = 0;
  always @(posedge clk) if (rst_n) begin seen_sel |= ~cs_n; cyc++; end

  initial begin
    static int lens[3] = '{16, 24, 32};
    sdo = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    check(cs_n == '1 && !sclk && !busy, "idle state");
    for (int d = 0; d < SPI_CS; d++)
      foreach (lens[li]) begin
        int len, t0, t1;
        logic [31:0] w, mask;
        len = lens[li];
        w = $urandom;
        resp = $urandom;
        mask = (len == 32) ? 32'hffff_ffff : ((32'd1 << len) - 1);
        rx = '0; nbits = 0; seen_sel = '0;
        @(negedge clk);
        cmd.data = w; cmd.len_m1 = 5'(len - 1); cmd.cs_sel = 3'(d);
        start = 1'b1;
        @(negedge clk); start = 1'b0;
        t0 = cyc;
        check(busy, "busy after start");
        wait (done);
        t1 = cyc;
        @(negedge clk);
        check(nbits == len, $sformatf("bit count %0d/%0d", nbits, len));
        check(rx == (w & mask), $sformatf("word dev %0d len %0d: %h vs %h", d, len, rx, w & mask));
        check(seen_sel == SPI_CS'(1 << d), "only chosen select");
        check(cs_n == '1 && !sclk && !busy, "released");
        check(rdata == (resp >> (32 - len)), "read-back word");
        check((t1 - t0) >= 2 * len && (t1 - t0) <= 2 * len + 4, $sformatf("transfer duration %0d clocks for %0d bits", t1 - t0, len));
        repeat (3) @(posedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
