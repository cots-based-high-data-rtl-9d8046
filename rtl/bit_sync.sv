// bit_sync: two flip-flop synchroniser for slowly changing level signals
// (enables and status flags) entering a clock domain. Each bit is treated
// independently, so it must only be used on signals whose bits may be seen
// changing on different cycles. Latency: two destination clock cycles.
module bit_sync #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
endmodule
