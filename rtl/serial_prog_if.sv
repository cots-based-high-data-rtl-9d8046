// serial_prog_if: serial programming port for the ADCs and the acquisition
// PLL.
//
// Runs on the 20 MHz logic clock and shifts one configuration word, 1 to 32
// bits long and most significant bit first, to the device chosen by cs_sel
// (0-3: ADC boards, 4: acquisition PLL; each has its own active-low select).
// The serial clock is half the module clock (10 MHz), idles low, and the
// devices sample sdata on its rising edge (SPI mode 0). sdo from the devices
// is sampled on the same rising edge, so a read-back word is collected in
// rdata. The select is asserted one clock before the first bit and released
// one serial-clock period after the last.
//
// start is a one-cycle pulse; cmd must stay unchanged while busy is high.
// done pulses when the select has been released. The word format of the
// devices is not fixed here: software builds each word.
module serial_prog_if
  import daq_pkg::*;
#(
  parameter int unsigned NCS = SPI_CS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  spi_cmd_t        cmd,
  output logic            busy,
  output logic            done,
  output logic [31:0]     rdata,
  output logic            sclk,
  output logic            sdata,
  output logic [NCS-1:0]  cs_n,
  input  logic            sdo
);
  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_SHIFT, S_HOLD} state_e;
  state_e      state;
  logic [31:0] sh;
  logic [4:0]  bit_left;
  logic        phase;      // 0: clock low half, 1: clock high half
  logic [NCS-1:0] sel;

  always_comb begin
    sel = '0;
    for (int i = 0; i < NCS; i++)
      if (cmd.cs_sel == i[2:0]) sel[i] = 1'b1;
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= S_IDLE;
      sh       <= '0;
      bit_left <= '0;
      phase    <= 1'b0;
      sclk     <= 1'b0;
      sdata    <= 1'b0;
      cs_n     <= '1;
      rdata    <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          // left-align the word so that its MSB leaves first
          sh       <= cmd.data << (5'd31 - cmd.len_m1);
          bit_left <= cmd.len_m1;
          cs_n     <= ~sel;
          rdata    <= '0;
          state    <= S_SETUP;
        end
        S_SETUP: begin
          sdata <= sh[31];
          phase <= 1'b0;
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          if (!phase) begin
            sclk  <= 1'b1;                // devices sample here
            rdata <= {rdata[30:0], sdo};
            phase <= 1'b1;
          end else begin
            sclk  <= 1'b0;
            phase <= 1'b0;
            if (bit_left == 5'd0) state <= S_HOLD;
            else begin
              bit_left <= bit_left - 5'd1;
              sh       <= sh << 1;
              sdata    <= sh[30];
            end
          end
        end
        S_HOLD: begin
          if (!phase) phase <= 1'b1;
          else begin
            cs_n  <= '1;
            sdata <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
endmodule
