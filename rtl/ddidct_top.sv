// ddidct_top -- data-driven 8x8 inverse DCT.
//
// The input side (clk, one coefficient per cycle at the coefficient rate
// fs) writes only the non-zero coefficients of a block, tagged with their
// position, into one of two FIFOs while the processing side (pclk) works
// through the other FIFO. Each non-zero coefficient is processed in 13
// pclk cycles: its magnitude sits in a 23-bit shift register that moves
// left once a cycle and is broadcast to 64 accumulators, one per output
// sample, each of which adds or skips it under control of its own
// reconstruction constant (bit-serial multiply-accumulate). Zero
// coefficients cost nothing. When the block is done the 64 sums are
// rounded and held in pix (pix_valid pulses, pclk domain).
//
// The input side also reports load, the block's non-zero count, and
// vdd_sel, the supply / clock level chosen from it (thresholds 16/32/48).
// vdd_sel drives an external adjustable supply and the clock generator
// that delivers pclk. pclk must give about 13*load + 8 cycles within 61
// clk cycles (13*load + 5 for processing, see proc_control, plus the
// synchronisers in both directions), otherwise overrun is raised.
//
// Interface: din is 12-bit sign-magnitude, raster order (position
// 8*v + u, v vertical, u horizontal frequency), valid when din_valid;
// pix[8*m + n] is the sample of row m, column n. The first block starts at
// the first valid coefficient after reset. rst_n is asynchronous and is
// synchronised into each clock domain.
//
// The structure (IN_CONTROL, two FIFOs, read multiplexer, 23-bit shift
// register, 64 accumulators, LOAD-driven supply selection) comes from the
// original architecture. The two-clock hand-over, the overrun flag and the
// output rounding stage are this implementation's own.
module ddidct_top
  import ddidct_pkg::*;
(
  input  logic                               clk,
  input  logic                               pclk,
  input  logic                               rst_n,
  input  logic                               din_valid,
  input  logic [COEF_W-1:0]                  din,
  output logic [LOAD_W-1:0]                  load,
  output logic [1:0]                         vdd_sel,
  output logic signed [NCOEF-1:0][PIX_W-1:0] pix,
  output logic                               pix_valid,
  output logic                               overrun,
  output logic                               busy
);
  logic                              rst_in_n, rst_p_n;
  logic [1:0]                        fifo_w, fifo_wclr, fifo_r, fifo_rclr;
  coef_entry_t                       fifo_d;
  coef_entry_t                       fifo_q [2];
  logic                              blk_tgl, done_tgl;
  logic [POS_W-1:0]                  bus_pos;
  logic                              bus_sign;
  logic [MAG_W-1:0]                  bus_mag;
  logic                              ld, shift, acc_clr, blk_done;
  logic [CMAG_W-1:0]                 coeff_mag;
  logic signed [NCOEF-1:0][ACC_W-1:0] acc;

  reset_sync u_rst_in (.clk(clk),  .rst_n_i(rst_n), .rst_n_o(rst_in_n));
  reset_sync u_rst_p  (.clk(pclk), .rst_n_i(rst_n), .rst_n_o(rst_p_n));

  in_control u_in (
    .clk, .rst_n(rst_in_n), .din_valid, .din,
    .fifo_w, .fifo_wclr, .fifo_d, .load, .blk_tgl, .done_tgl, .overrun
  );

  supply_select u_sup (.load, .level(vdd_sel));

  for (genvar f = 0; f < 2; f++) begin : g_fifo
    coef_fifo #(.DEPTH(NCOEF), .W(ENTRY_W)) u_fifo (
      .wclk(clk), .wrst_n(rst_in_n), .wclr(fifo_wclr[f]), .w(fifo_w[f]), .d(fifo_d),
      .rclk(pclk), .rrst_n(rst_p_n), .rclr(fifo_rclr[f]), .r(fifo_r[f]), .q(fifo_q[f])
    );
  end

  proc_control u_ctl (
    .clk(pclk), .rst_n(rst_p_n), .blk_tgl, .load,
    .fifo0_q(fifo_q[0]), .fifo1_q(fifo_q[1]), .fifo_r, .fifo_rclr,
    .bus_pos, .bus_sign, .bus_mag, .ld, .shift, .acc_clr, .blk_done,
    .done_tgl, .busy
  );

  coef_shift_reg u_csr (
    .clk(pclk), .rst_n(rst_p_n), .load(ld), .shift, .mag(bus_mag), .coeff_mag
  );

  for (genvar j = 0; j < NCOEF; j++) begin : g_acc
    accum #(.J(j)) u_acc (
      .clk(pclk), .rst_n(rst_p_n), .clr(acc_clr), .load(ld),
      .pos(bus_pos), .coeff_sign(bus_sign), .coeff_mag, .acc(acc[j])
    );
  end

  result_regs u_res (
    .clk(pclk), .rst_n(rst_p_n), .capture(blk_done), .acc, .pix, .valid(pix_valid)
  );
endmodule
