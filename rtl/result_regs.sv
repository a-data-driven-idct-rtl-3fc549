// result_regs -- output registers of the 64 reconstructed samples.
//
// On capture (the processing side's blk_done) every accumulator value,
// in units of 2^-15, is rounded to the nearest integer (ties upward:
// add 2^14, shift right arithmetically by 15) and clipped to the 9-bit
// range -256..255, and the result is held in pix until the next block.
// valid pulses for one cycle after the capture edge. Async reset to 0.
//
// The design accumulates in result registers but does not describe the
// output stage; rounding, clipping range (that of IEEE 1180 test
// outputs) and the hold register are this implementation's choices.
module result_regs
  import ddidct_pkg::*;
(
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                capture,
  input  logic signed [NCOEF-1:0][ACC_W-1:0]  acc,
  output logic signed [NCOEF-1:0][PIX_W-1:0]  pix,
  output logic                                valid
);
  localparam logic signed [ACC_W-1:0] HALF = ACC_W'(1) <<< (FRAC_W - 1);
  localparam int PMAX = 2**(PIX_W-1) - 1;
  localparam int PMIN = -(2**(PIX_W-1));

  function automatic logic signed [PIX_W-1:0] round_clip(input logic signed [ACC_W-1:0] a);
    logic signed [ACC_W-1:0] r;
    r = (a + HALF) >>> FRAC_W;
    if (r > ACC_W'(PMAX))       return PIX_W'(PMAX);
    else if (r < ACC_W'(PMIN))  return PIX_W'(PMIN);
    else                        return r[PIX_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix   <= '0;
      valid <= 1'b0;
    end else begin
      valid <= capture;
      if (capture)
        for (int j = 0; j < NCOEF; j++) pix[j] <= round_clip(acc[j]);
    end
  end
endmodule
