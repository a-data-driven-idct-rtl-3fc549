// coef_fifo -- one half of the ping-pong coefficient buffer (FIFO0/FIFO1).
//
// DEPTH words of W bits. The write side runs on wclk (the coefficient input
// rate): w writes d at the write pointer and advances it, wclr returns the
// pointer to 0 for the next block. The read side runs on rclk (the
// processing clock): q always shows the word at the read pointer
// (show-ahead, asynchronous read), r advances the pointer, rclr returns it
// to 0. The buffer is filled completely before it is read (the other half
// is written meanwhile), so no full/empty flags are kept; the writer knows
// how many words it stored. Storage is a plain array and is not reset.
//
// The 18-bit width and the role come from the original architecture; depth 64 (one full
// block) and the pointer handling are this implementation's choice.
module coef_fifo #(
  parameter int DEPTH = 64,
  parameter int W     = 18
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wclr,
  input  logic         w,
  input  logic [W-1:0] d,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rclr,
  input  logic         r,
  output logic [W-1:0] q
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  always_ff @(posedge wclk) if (w) mem[wptr] <= d;

  always_ff @(posedge wclk or negedge wrst_n)
    if (!wrst_n)   wptr <= '0;
    else if (wclr) wptr <= '0;
    else if (w)    wptr <= wptr + 1'b1;

  always_ff @(posedge rclk or negedge rrst_n)
    if (!rrst_n)   rptr <= '0;
    else if (rclr) rptr <= '0;
    else if (r)    rptr <= rptr + 1'b1;

  assign q = mem[rptr];
endmodule
