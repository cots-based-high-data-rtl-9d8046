// rst_sync: reset bridge. The board reset is applied asynchronously to a
// clock domain and released synchronously, two clock cycles after the
// input goes high, so every flip-flop of the domain leaves reset on the
// same edge.
module rst_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n_in)
    if (!rst_n_in) {rst_n, meta} <= 2'b00;
    else           {rst_n, meta} <= {meta, 1'b1};
endmodule
