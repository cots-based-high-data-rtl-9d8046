// tb_slave_mgmt: self-checking test of the register bridge between the
// 250 MHz DMA-core side and the 100 MHz control side. A 16 x 128-bit
// register model answers on the control side with one cycle of read
// latency. Random writes and reads are issued from the DMA side; each
// write must reach the model exactly once with its address and data, each
// read must return the model's word, and every access must complete
// within a bounded number of cycles.
module tb_slave_mgmt;
  import daq_pkg::*;
  logic t_clk = 1'b0, clk = 1'b0, rst_n = 1'b0;
  logic t_req = 1'b0, t_we = 1'b0, t_busy, t_ack;
  logic [REG_AW-1:0] t_addr = '0;
  logic [REG_W-1:0] t_wdata = '0, t_rdata;
  logic reg_wr, reg_rd, reg_rvalid = 1'b0;
  logic [REG_AW-1:0] reg_addr;
  logic [REG_W-1:0] reg_wdata, reg_rdata = '0;
  int checks = 0, failures = 0;

  slave_mgmt dut (.t_clk, .t_rst_n(rst_n), .t_req, .t_we, .t_addr, .t_wdata, .t_busy, .t_ack,
    .t_rdata, .clk, .rst_n, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata, .reg_rvalid);

  always #2ns t_clk = ~t_clk;
  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // register model on the control side
  logic [REG_W-1:0] regs [16];
  int n_wr = 0, n_rd = 0;
  always @(posedge clk) begin
    reg_rvalid <= 1'b0;
    if (rst_n && reg_wr) begin regs[reg_addr] <= reg_wdata; n_wr++; end
    if (rst_n && reg_rd) begin reg_rdata <= regs[reg_addr]; reg_rvalid <= 1'b1; n_rd++; end
  end

  logic [REG_W-1:0] shadow [16];
  function automatic logic [REG_W-1:0] rnd();
    for (int i = 0; i < 4; i++) rnd[i*32 +: 32] = $urandom;
  endfunction

  task automatic access(input bit we, input logic [3:0] a, input logic [REG_W-1:0] d,
                        output logic [REG_W-1:0] q);
    int cyc;
    @(negedge t_clk); t_req = 1'b1; t_we = we; t_addr = a; t_wdata = d;
    @(negedge t_clk); t_req = 1'b0; t_wdata = rnd(); t_addr = ~a;  // inputs may change
    check(t_busy, "busy during access");
    cyc = 0;
    while (!t_ack && cyc < 40) begin @(posedge t_clk); #1ps; cyc++; end
    check(t_ack, "access acknowledged in time");
    q = t_rdata;
    @(negedge t_clk);
    check(!t_busy, "not busy after ack");
  endtask

  initial begin
    logic [REG_W-1:0] q;
    for (int i = 0; i < 16; i++) begin regs[i] = '0; shadow[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 16; i++) begin
      logic [REG_W-1:0] d;
      d = rnd();
      shadow[i] = d;
      access(1'b1, 4'(i), d, q);
    end
    check(n_wr == 16, "sixteen writes reached the registers");
    for (int k = 0; k < 60; k++) begin
      logic [3:0] a;
      a = 4'($urandom);
      if ($urandom % 2) begin
        logic [REG_W-1:0] d;
        d = rnd(); shadow[a] = d;
        access(1'b1, a, d, q);
      end else begin
        access(1'b0, a, '0, q);
        check(q == shadow[a], $sformatf("read data reg %0d", a));
      end
    end
    check(n_wr + n_rd == 76, "one register strobe per access");
    for (int i = 0; i < 16; i++) check(regs[i] == shadow[i], "register contents");
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
