# Data-driven 8x8 inverse DCT

Most DCT coefficients in compressed video are zero. A typical MPEG-2 stream
has only about six non-zero coefficients in an 8x8 block. A row-column IDCT
does the same work for every block, whatever is in it. This design does work
only for the non-zero coefficients. It computes the 2D IDCT in
*forward-mapped* form:

    x = y0*C0 + y1*C1 + ... + y63*C63

where `x` is the 64-sample output block, `yk` is coefficient `k` and `Ck` is a
fixed 64-element reconstruction vector. A zero `yk` contributes nothing, so it
is never stored, read or processed. Each non-zero coefficient costs 13 clock
cycles. In those cycles all 64 output samples are updated in parallel by
bit-serial multiply-accumulate.

The number of non-zero coefficients per block (`load`, 0..64) therefore sets
the work per block. The design reports it and maps it onto one of four
supply/clock levels (`vdd_sel`). An external adjustable supply and clock
generator can then run the processing section just fast enough. That clock
and supply are not part of this RTL.

## Block diagram

```
            clk domain (coefficient rate fs)      |   pclk domain (variable clock)
                                                  |
 din[11:0] --> in_control --w,d[17:0]--> FIFO0 ---+--\
 din_valid      |   |  \                 FIFO1 ---+--- mux --pos,sign--> 64 x accum --> result_regs --> pix[64]
                |   |   \--blk_tgl---------------->  (proc_control)           ^
                |   |   <--done_tgl---------------   |   \--mag--> coef_shift_reg
                |  load[6:0] --> supply_select --> vdd_sel     (COEFF_MAG[22:0], to all 64)
                |
              overrun
```

| Module           | Role |
|------------------|------|
| `in_control`     | Numbers the incoming coefficients 0..63. Writes only the non-zero ones, tagged with their position, into the FIFO currently being filled. Swaps the FIFOs at the end of each block and produces `load`. |
| `coef_fifo`      | One half of the ping-pong buffer: 64 x 18 bits, written on `clk`, read on `pclk`. Used twice. |
| `proc_control`   | Selects the FIFO that is not being written and steps through its entries, 13 cycles each. Drives the coefficient bus and the load, shift and clear strobes. |
| `coef_shift_reg` | 23-bit register that holds the coefficient magnitude and moves it one place left per cycle. Its output goes to all 64 accumulators. |
| `accum`          | One output sample. Holds its two-level constant ROM, a constant shift register, an operand latch and a signed add/subtract accumulator. Instantiated 64 times with `J` = 0..63. |
| `result_regs`    | Rounds and clips the 64 sums when a block is done, and holds them. |
| `supply_select`  | Maps `load` onto level 0..3 with thresholds 16 / 32 / 48. |
| `ddidct_pkg`     | Sizes, the FIFO word type and the constant functions that build the ROM contents. |
| `sync_2ff`, `reset_sync` | Clock-domain-crossing helpers. |

## The reconstruction constants

This is the least obvious part of the design. Coefficient `k = 8*v + u`
(`v` is the vertical frequency, `u` the horizontal one, raster order)
contributes to output sample `j = 8*m + n` (row `m`, column `n`) with the
constant

    C_k[j] = 1/4 * c(u) c(v) * cos((2n+1) u pi/16) * cos((2m+1) v pi/16),
    c(0) = 1/sqrt(2), c(w) = 1 otherwise.

The DC factor `1/sqrt(2)` equals `cos(4 pi/16)`. So every `|C_k[j]|` has the
form `1/4 cos(p pi/16) cos(q pi/16)` with `p, q` in 1..7, and there are only
28 distinct magnitudes. Each accumulator therefore uses a two-level lookup:

* **ROM0** (64 words, different for each accumulator) is indexed by the
  coefficient position. It returns the sign of `C_k[j]` and a 5-bit index.
* **ROM1** (28 words x 13 bits) returns the magnitude for that index.

Magnitudes are unsigned integers in units of 2^-15. The largest is 7880, for
0.2405, so 13 bits are enough. 13 bits is also the constant width that
meets the IEEE 1180 accuracy limits.

Both ROMs are computed during elaboration by functions in `ddidct_pkg`. They
start from a table of seven cosines, `COS20[k] = round(cos(k pi/16) * 2^20)`.
The magnitudes are `(COS20[p]*COS20[q] + 2^26) >> 27`, which equals
`round(|C| * 2^15)` for all 28 values. The sign and index of every
(position, sample) pair come from reducing `(2s+1)*w mod 32` to a cosine
class. No table is typed in by hand. To change the constant precision,
change `CONST_W` and `FRAC_W` and the rounding shift in `make_rom1`.

## Bit-serial multiply-accumulate

A coefficient arrives as 12-bit sign-magnitude: 1 sign bit and an 11-bit
magnitude. Its 13 cycles work like this:

1. On one clock edge, three things are loaded. `coef_shift_reg` gets the
   magnitude. Every accumulator loads its 13-bit constant magnitude into its
   constant shift register. Every accumulator also registers the product
   sign, which is the coefficient sign XOR the constant sign.
2. In cycle `i` (i = 0..12) the broadcast bus `coeff_mag` carries
   `mag << i`. Each accumulator looks at bit `i` of its constant, the LSB of
   its right-shifting constant register. If the bit is 1, it adds `mag << i`
   to its sum, or subtracts it if the product is negative. If the bit is 0,
   it does nothing.
3. After 13 cycles each sum has changed by `+/- mag * |C|`. On the same edge
   that takes the last bit, the next coefficient is loaded. Coefficients
   therefore follow each other with no idle cycle.

The adder operand comes through a level-sensitive latch that is open only
while the constant bit is 1. On cycles with nothing to add, the adder inputs
stay still and the adder does not switch. This latch is intended: synthesis
reports 23 latch bits per accumulator (1472 in all).

Accumulators are 31 bits, signed, in units of 2^-15. 31 bits is enough for
the largest possible block (64 * 2047 * 7880 < 2^30), so no input can make
them overflow. At the end of a block, `result_regs` rounds each sum half up
(add 2^14, arithmetic shift right by 15) and clips it to -256..255.

## Timing and the two clocks

The input side runs on `clk` and takes one coefficient per cycle when
`din_valid` is high. After position 63:

* `load` (a register) shows the block's non-zero count, and `vdd_sel`
  (decoded from `load`) the matching level. Both are in the `clk` domain.
* The FIFOs swap roles and `blk_tgl` toggles.

`proc_control` synchronises the toggle into `pclk` (2 cycles). It then
processes the block:

| cycles | action |
|--------|--------|
| 1 | IDLE: clear the accumulators and the FIFO read pointer |
| 1 | FETCH: load the first entry (skipped if `load` = 0) |
| 13 x N | RUN: N = `load` non-zero coefficients |
| 1 | DONE: `blk_done`; `result_regs` captures, and `pix_valid` pulses one cycle later |

The input side checks the acknowledgement `done_tgl` at the next swap. It
sees the acknowledgement 2 `clk` cycles after it is sent. If the block has
not been acknowledged by then, its FIFO is about to be overwritten, and the
sticky `overrun` output goes high. The processing clock must therefore give
about **13*N + 8 pclk cycles within 61 clk cycles**. At N = 64 that is
13.8 x fs. At the lowest level it is sized for 16 coefficients, about
3.5 x fs. The original architecture quotes 13 fs for 64 coefficients and
0.2 fs for a single one. The difference is the fixed FETCH, DONE and
synchroniser cycles of this implementation.

Supply levels, from `supply_select` (a count equal to a threshold takes the
lower level):

| `load`  | `vdd_sel` | intended supply |
|---------|-----------|-----------------|
| 0..16   | 0 | 1.5 V |
| 17..32  | 1 | 2.7 V |
| 33..48  | 2 | 3.9 V |
| 49..64  | 3 | 5.0 V |

A block handed over at level `L` is processed during the next input block.
`vdd_sel` changes exactly at the hand-over, so the clock for each block's
processing follows that block's own count.

## Top-level interface (`ddidct_top`)

| Port | Dir | Width | Clock | Meaning |
|------|-----|-------|-------|---------|
| `clk` | in | 1 | | coefficient clock |
| `pclk` | in | 1 | | processing clock from the external variable clock generator |
| `rst_n` | in | 1 | async | active-low reset, synchronised into both domains |
| `din_valid`, `din` | in | 1, 12 | clk | sign-magnitude coefficient, raster order; the first valid one after reset is position 0 |
| `load` | out | 7 | clk | non-zero count of the last complete block |
| `vdd_sel` | out | 2 | clk | supply / clock level |
| `pix` | out | 64 x 9 | pclk | reconstructed samples, `pix[8*m+n]`, signed |
| `pix_valid` | out | 1 | pclk | `pix` holds a new block |
| `overrun` | out | 1 | clk | sticky: processing clock was too slow |
| `busy` | out | 1 | pclk | a block is being processed |

Output block *b* appears while input block *b+1* is arriving. Hold
`rst_n` low for at least a few cycles of both clocks. The `pclk`-domain
outputs have no defined value until the first `pclk` edge inside reset.

## Where this RTL departs from the original architecture

* **ROM sizes.** The original describes ROM0 as 64 x 5 bits (sign plus a
  4-bit index) and ROM1 as 1 to 10 words. The 8x8 IDCT needs all 28 distinct
  magnitudes at every output sample, so a 4-bit index cannot address them.
  Here ROM0 is 64 x 6 and ROM1 is 28 x 13 in every accumulator. The
  arithmetic is unchanged.
* **LOAD width.** The original labels the count `LOAD[5:0]`, but the count
  runs from 0 to 64. It is 7 bits here.
* **Product sign.** It is registered when the constant is loaded, rather
  than formed combinationally from the coefficient bus.
* **Own additions.** The following are not in the original: the
  `din_valid` framing, the toggle hand-over between clock domains, the
  `overrun` flag, clearing the accumulators per block, the output rounding
  and clipping, and the hold register.
* **Not included.** The adjustable DC-DC converter and the variable clock
  generator are analog parts. They are outside the RTL: `vdd_sel` is
  brought out and `pclk` is an input. Its required rate is given above.
* **Coefficient range.** 12-bit sign-magnitude covers -2047..2047. A
  two's-complement -2048 must be clamped before the input.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line:

* `tb_ddidct_top` runs the whole design at its default sizes. It sends 32
  blocks with counts 0, 1, 5, 16/17, 32/33, 48/49, 64, random counts, full
  scale and small amplitudes, plus a negative zero and idle gaps. `pclk`
  comes from `tb/var_clock_model.sv`, a behavioural clock that follows
  `vdd_sel`. The testbench checks:
  * every sample, bit-exact, against a model that uses the 13-bit constants;
  * every sample of the small-amplitude blocks, against the ideal real-valued
    IDCT, to within 1;
  * `load` and `vdd_sel`;
  * exactly 13 cycles per coefficient plus one FETCH cycle;
  * that `overrun` stays low, and that it rises once the clock is forced too
    slow.

  It also counts that each mechanism happened: zero skipping, empty and full
  blocks, all four levels, operand-latch hold, subtraction, both FIFOs and
  overrun.
* `tb_ddidct_pkg` checks every ROM entry against `$cos`.
* `tb_accum` checks the serial multiply-accumulate of four accumulators
  against `$cos`-derived constants.
* `tb_proc_control`, `tb_in_control`, `tb_coef_fifo`, `tb_coef_shift_reg`,
  `tb_result_regs` and `tb_supply_select` check their modules against
  models kept in each testbench.

Two further testbenches run whole workloads through the top at its
default sizes:

* `tb_ieee1180` runs an accuracy test in the manner of IEEE Std 1180-1990.
  It uses 10,000 random blocks in each of the ranges -256..255, -5..5 and
  -300..300, forward-transformed in double precision and rounded to
  integers. It compares the outputs with a double-precision IDCT and checks
  the standard's limits. The random numbers come from `$urandom`, not from
  the standard's own generator. Typical results: peak error 1, overall mean
  square error about 0.005 (the limit is 0.02), worst per-position mean
  square error about 0.02 (the limit is 0.06). An all-zero block gives an
  all-zero output.
* `tb_mpeg_stream` runs 1000 synthetic sparse blocks, about 6 non-zero
  coefficients per block, mostly at low frequencies. It checks every sample
  and every cycle count, and reports the work per block:
  * about 1870 additions;
  * 128 ROM reads (ROM0 and ROM1 in each of the 64 accumulators) per
    non-zero coefficient;
  * 2 FIFO accesses per non-zero coefficient;
  * about 81 busy processing cycles.

  About 94 % of these blocks run at the lowest supply level.

`in_control` and `proc_control` carry assertions on the FIFO write/read
strobes and on the sequencer. Verilator checks them with `--assert`.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/ddidct_pkg.sv tb/tb_ddidct_top.sv --top-module tb_ddidct_top
./obj_dir/Vtb_ddidct_top
```

Add `--assert` to check the assertions. Replace `tb_ddidct_top` with any
other testbench name to run that one.

The RTL is SystemVerilog 2017 and synthesizable, apart from the intended
operand latches. Storage arrays (FIFOs) are not reset. Everything else
resets asynchronously.
