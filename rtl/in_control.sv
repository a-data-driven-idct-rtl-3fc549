// in_control -- input side of the data-driven IDCT (IN_CONTROL).
//
// Coefficients of an 8x8 block arrive one per clk cycle (din_valid high) in
// raster order, as 12-bit sign-magnitude words. A 6-bit position counter
// (pos, internal) numbers them 0..63. Only coefficients with a non-zero magnitude are
// written, as {pos, din}, into the FIFO currently being filled (fifo_w one-hot
// on the selected FIFO, combinational from din_valid/din). When position 63
// has been taken, the block is complete: load is set to the number of
// non-zero coefficients of that block (0..64), the two FIFOs swap roles
// (ping-pong), the write pointer of the next FIFO is cleared and blk_tgl
// toggles to hand the block to the processing side.
//
// done_tgl comes back from the processing clock domain, one toggle per
// finished block. If a block is still unfinished when the next block is
// handed over, the FIFO it occupies is about to be overwritten: overrun
// goes high and stays high until reset.
//
// Taken from the original architecture: zero skipping with position annotation, ping-pong
// FIFOs, LOAD as the block's non-zero count. Own choices: load is 7 bits
// wide (the count reaches 64), din_valid framing, the toggle hand-over and
// the overrun flag. A negative zero (sign set, magnitude 0) counts as zero.
module in_control
  import ddidct_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                din_valid,
  input  logic [COEF_W-1:0]   din,
  output logic [1:0]          fifo_w,
  output logic [1:0]          fifo_wclr,
  output coef_entry_t         fifo_d,
  output logic [LOAD_W-1:0]   load,
  output logic                blk_tgl,
  input  logic                done_tgl,
  output logic                overrun
);
  logic [POS_W-1:0]  pos;
  logic              wsel;
  logic [LOAD_W-1:0] wcnt;
  logic              nz, last, done_s;

  sync_2ff u_sync (.clk, .rst_n, .d(done_tgl), .q(done_s));

  assign nz     = din_valid && (din[MAG_W-1:0] != '0);
  assign last   = din_valid && (pos == POS_W'(NCOEF-1));
  assign fifo_d = '{pos: pos, sign: din[COEF_W-1], mag: din[MAG_W-1:0]};

  always_comb begin
    fifo_w          = 2'b00;
    fifo_w[wsel]    = nz;
    fifo_wclr       = 2'b00;
    fifo_wclr[~wsel] = last;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos     <= '0;
      wsel    <= 1'b0;
      wcnt    <= '0;
      load    <= '0;
      blk_tgl <= 1'b0;
      overrun <= 1'b0;
    end else if (din_valid) begin
      pos <= pos + 1'b1;
      if (last) begin
        load    <= wcnt + LOAD_W'(nz);
        wcnt    <= '0;
        wsel    <= ~wsel;
        blk_tgl <= ~blk_tgl;
        // previous hand-over not yet acknowledged by the processing side
        if (blk_tgl != done_s) overrun <= 1'b1;
      end else begin
        wcnt <= wcnt + LOAD_W'(nz);
      end
    end
  end

  // at most one FIFO is written, and never the one being cleared
  a_one_fifo: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(fifo_w) && (fifo_w & fifo_wclr) == 2'b00);
endmodule
