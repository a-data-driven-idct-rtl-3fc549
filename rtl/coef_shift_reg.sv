// coef_shift_reg -- coefficient magnitude shift register (SHIFT REGISTER,
// COEFF_MAG[22:0]).
//
// load places the 11-bit coefficient magnitude in the low bits of a 23-bit
// register; each cycle with shift high the register moves one place left.
// During the 13 cycles of one coefficient the output is therefore
// mag * 2^i in cycle i (i = 0..12), broadcast to all 64 accumulators, which
// each add it or not according to bit i of their constant. load has
// priority over shift. Registered output, async reset to 0.
//
// Width and behaviour come from the original architecture; the shift enable is this
// implementation's choice (the register holds still between blocks).
module coef_shift_reg
  import ddidct_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              shift,
  input  logic [MAG_W-1:0]  mag,
  output logic [CMAG_W-1:0] coeff_mag
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     coeff_mag <= '0;
    else if (load)  coeff_mag <= CMAG_W'(mag);
    else if (shift) coeff_mag <= coeff_mag << 1;
endmodule
