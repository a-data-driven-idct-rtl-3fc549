// reset_sync -- reset synchroniser: asserts rst_n_o asynchronously with
// rst_n_i and releases it two clk edges after rst_n_i goes high, so every
// clock domain leaves reset cleanly on its own clock.
module reset_sync (
  input  logic clk,
  input  logic rst_n_i,
  output logic rst_n_o
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n_i)
    if (!rst_n_i) {rst_n_o, meta} <= 2'b00;
    else          {rst_n_o, meta} <= {meta, 1'b1};
endmodule
