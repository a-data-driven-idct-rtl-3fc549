// accum -- one of the 64 accumulators; it computes output sample J = 8*m + n
// of the 8x8 block as a running sum of y[k] * C_k[J] over the non-zero
// coefficients y[k].
//
// Two-level constant lookup: the coefficient position indexes ROM0 (64
// words of {constant sign, magnitude index}, specific to this J); the
// index selects a 13-bit magnitude in ROM1. With load high the magnitude is
// placed in a constant shift register and the product sign
// (coefficient sign XOR constant sign) is registered. In each of the next
// 13 cycles the register's LSB decides whether the broadcast shifted
// coefficient magnitude coeff_mag (mag * 2^i in cycle i) is added to or
// subtracted from the accumulator; the register then shifts right. After
// 13 cycles the accumulator has changed by +/- mag * constant: a bit-serial
// multiply-accumulate. A level-sensitive latch, open only while the LSB is
// 1, holds the adder operand still on cycles with nothing to add, so the
// adder does not switch; this latch is intentional (circuit warnings about
// it are expected).
//
// Timing: load and the coefficient shift register load share one clock
// edge; the accumulation of the previous coefficient's last bit happens on
// that same edge. clr (synchronous, priority) empties the accumulator at
// the start of a block. acc is the value in units of 2^-15.
//
// Taken from the original architecture: the two-level ROM, the 13-bit constants, the
// constant shift register whose LSB gates accumulation and the operand
// latch, the add/subtract by sign. Own choices: a 5-bit magnitude index
// and a 28-entry ROM1 (the 2D IDCT has 28 distinct constant magnitudes per
// output sample), the registered product sign, a 31-bit accumulator, wide enough that no input block can overflow it.
module accum
  import ddidct_pkg::*;
#(
  parameter int J = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     load,
  input  logic [POS_W-1:0]         pos,
  input  logic                     coeff_sign,
  input  logic [CMAG_W-1:0]        coeff_mag,
  output logic signed [ACC_W-1:0]  acc
);
  localparam rom0_t ROM0 = make_rom0(J);

  rom0_word_t         r0;
  logic [CONST_W-1:0] ksr;   // constant shift register
  logic               neg;   // product sign of the coefficient in flight
  logic [CMAG_W-1:0]  op;    // latched adder operand

  assign r0 = ROM0[pos];

  always_latch
    if (ksr[0]) op = coeff_mag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ksr <= '0;
      neg <= 1'b0;
      acc <= '0;
    end else begin
      if (load) begin
        ksr <= ROM1[r0.idx];
        neg <= coeff_sign ^ r0.sign;
      end else begin
        ksr <= ksr >> 1;
      end
      if (clr)
        acc <= '0;
      else if (ksr[0])
        acc <= neg ? acc - ACC_W'(op) : acc + ACC_W'(op);
    end
  end
endmodule
