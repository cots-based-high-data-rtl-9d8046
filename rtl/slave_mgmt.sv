// slave_mgmt: slave management module, the bridge from the host's register
// accesses to the control logic.
//
// The DMA core delivers host reads and writes of the board registers on its
// own 250 MHz clock (t_* signals); the control registers live on the 100 MHz
// logic clock (reg_* signals, see main_ctrl). One access is handled at a
// time: t_req (one cycle, only while t_busy is low) latches t_we, t_addr and
// t_wdata, which then stay still while a request event crosses to the logic
// clock. There the access is made; for a read the returned word is held and
// an acknowledge event crosses back. t_ack pulses for one cycle when the
// access is complete, with t_rdata valid from then until the next request.
// Round trip: about three logic clock and three DMA clock cycles.
// The request/acknowledge protocol is this design's own.
module slave_mgmt
  import daq_pkg::*;
(
  // DMA core side
  input  logic              t_clk,
  input  logic              t_rst_n,
  input  logic              t_req,
  input  logic              t_we,
  input  logic [REG_AW-1:0] t_addr,
  input  logic [REG_W-1:0]  t_wdata,
  output logic              t_busy,
  output logic              t_ack,
  output logic [REG_W-1:0]  t_rdata,
  // control logic side
  input  logic              clk,
  input  logic              rst_n,
  output logic              reg_wr,
  output logic              reg_rd,
  output logic [REG_AW-1:0] reg_addr,
  output logic [REG_W-1:0]  reg_wdata,
  input  logic [REG_W-1:0]  reg_rdata,
  input  logic              reg_rvalid
);
  // request held in the DMA clock domain
  logic              h_we;
  logic [REG_AW-1:0] h_addr;
  logic [REG_W-1:0]  h_wdata;
  logic              req_go, req_c, ack_go, ack_t;
  logic [REG_W-1:0]  h_rdata;

  always_ff @(posedge t_clk or negedge t_rst_n)
    if (!t_rst_n) begin
      h_we    <= 1'b0;
      h_addr  <= '0;
      h_wdata <= '0;
      t_busy  <= 1'b0;
      req_go  <= 1'b0;
      t_ack   <= 1'b0;
      t_rdata <= '0;
    end else begin
      req_go <= 1'b0;
      t_ack  <= 1'b0;
      if (t_req && !t_busy) begin
        h_we    <= t_we;
        h_addr  <= t_addr;
        h_wdata <= t_wdata;
        t_busy  <= 1'b1;
        req_go  <= 1'b1;
      end else if (ack_t) begin
        t_busy  <= 1'b0;
        t_ack   <= 1'b1;
        t_rdata <= h_rdata;
      end
    end

  pulse_sync u_req (.src_clk(t_clk), .src_rst_n(t_rst_n), .src_pulse(req_go),
                    .dst_clk(clk), .dst_rst_n(rst_n), .dst_pulse(req_c));

  // logic clock domain: perform the access
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      reg_wr    <= 1'b0;
      reg_rd    <= 1'b0;
      reg_addr  <= '0;
      reg_wdata <= '0;
      ack_go    <= 1'b0;
      h_rdata   <= '0;
    end else begin
      reg_wr <= req_c &&  h_we;
      reg_rd <= req_c && !h_we;
      ack_go <= 1'b0;
      if (req_c) begin
        reg_addr  <= h_addr;
        reg_wdata <= h_wdata;
      end
      if (reg_wr) ack_go <= 1'b1;
      if (reg_rvalid) begin
        h_rdata <= reg_rdata;
        ack_go  <= 1'b1;
      end
    end

  pulse_sync u_ack (.src_clk(clk), .src_rst_n(rst_n), .src_pulse(ack_go),
                    .dst_clk(t_clk), .dst_rst_n(t_rst_n), .dst_pulse(ack_t));

  a_no_req_busy: assert property (@(posedge t_clk) disable iff (!t_rst_n) t_busy |-> !t_req);
endmodule
