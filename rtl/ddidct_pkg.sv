// ddidct_pkg -- shared sizes, the FIFO entry type and the reconstruction
// constants of the data-driven 8x8 IDCT.
//
// The 2D IDCT is computed in forward-mapped form: every non-zero coefficient
// y[k] (k = 8*v + u, v = vertical and u = horizontal frequency, raster order)
// adds y[k] * C_k[j] to each of the 64 output samples j = 8*m + n, with
//   C_k[j] = 1/4 * c(u) c(v) cos((2n+1)u*pi/16) cos((2m+1)v*pi/16),
//   c(0) = 1/sqrt(2), c(w) = 1 otherwise.
// |C_k[j]| is always 1/4 * cos(p*pi/16) * cos(q*pi/16) for some p, q in 1..7
// (the DC factor 1/sqrt(2) equals cos(4*pi/16)), so only 28 distinct
// magnitudes exist. They are stored as 13-bit unsigned integers in units of
// 2^-15 (largest value 7880), which is the 13-bit constant width the design
// uses for IEEE 1180 accuracy. Each accumulator owns a 64-entry first-level
// ROM of {sign, magnitude index} and a second-level ROM of magnitudes; both
// are computed here at elaboration time from a 7-entry cosine table, so no
// table is typed in by hand.
//
// Cosine table: COS20[k] = round(cos(k*pi/16) * 2^20), k = 1..7.
// Magnitude:    MAG[p,q] = (COS20[p]*COS20[q] + 2^26) >> 27
//             = round(1/4 * cos(p*pi/16) * cos(q*pi/16) * 2^15).
package ddidct_pkg;

  localparam int NCOEF    = 64;  // coefficients / samples per 8x8 block
  localparam int POS_W    = 6;   // coefficient position 0..63
  localparam int COEF_W   = 12;  // sign-magnitude input coefficient
  localparam int MAG_W    = 11;  // magnitude part of a coefficient
  localparam int ENTRY_W  = POS_W + COEF_W;   // 18-bit FIFO word
  localparam int CONST_W  = 13;  // reconstruction-constant magnitude bits
  localparam int NBITS    = 13;  // cycles per coefficient (one per constant bit)
  localparam int CMAG_W   = MAG_W + NBITS - 1; // 23-bit shifted magnitude bus
  localparam int NMAG     = 28;  // distinct constant magnitudes
  localparam int IDX_W    = 5;   // magnitude index width
  localparam int FRAC_W   = 15;  // fraction bits of the accumulators
  localparam int ACC_W    = 31;  // signed accumulator width (64 * 2047 * 7880 < 2^30)
  localparam int PIX_W    = 9;   // output sample, clipped to -256..255
  localparam int LOAD_W   = 7;   // non-zero count 0..64

  // One FIFO word: position of the coefficient and the coefficient itself
  // in sign-magnitude form.
  typedef struct packed {
    logic [POS_W-1:0] pos;
    logic             sign;
    logic [MAG_W-1:0] mag;
  } coef_entry_t;

  // First-level ROM word: sign of the constant and index of its magnitude.
  typedef struct packed {
    logic             sign;
    logic [IDX_W-1:0] idx;
  } rom0_word_t;

  typedef rom0_word_t [NCOEF-1:0]             rom0_t;
  typedef logic [NMAG-1:0][CONST_W-1:0]       rom1_t;

  function automatic longint cos20(input int k);
    case (k)
      1: return 1028428;
      2: return 968758;
      3: return 871859;
      4: return 741455;
      5: return 582558;
      6: return 401273;
      7: return 204567;
      default: return 0;
    endcase
  endfunction

  // Index of the unordered pair {p, q}, p, q in 1..7, in 0..27.
  function automatic int pair_idx(input int p, input int q);
    int a, b, idx;
    a = (p < q) ? p : q;
    b = (p < q) ? q : p;
    idx = 0;
    for (int i = 1; i < a; i++) idx += 8 - i;
    return idx + (b - a);
  endfunction

  // Cosine class of c(w) cos((2s+1) w pi/16): returns {negative, class 1..7}.
  function automatic logic [3:0] cos_class(input int w, input int s);
    int t;
    if (w == 0) return {1'b0, 3'd4};
    t = ((2*s + 1) * w) % 32;
    if (t > 16) t = 32 - t;
    if (t < 8)  return {1'b0, 3'(t)};
    return {1'b1, 3'(16 - t)};
  endfunction

  function automatic rom1_t make_rom1();
    rom1_t r;
    for (int p = 1; p <= 7; p++)
      for (int q = p; q <= 7; q++)
        r[pair_idx(p, q)] = CONST_W'((cos20(p) * cos20(q) + (longint'(1) << 26)) >> 27);
    return r;
  endfunction

  // First-level ROM of the accumulator for output sample j = 8*m + n.
  function automatic rom0_t make_rom0(input int j);
    rom0_t r;
    logic [3:0] cv, cu;
    for (int k = 0; k < NCOEF; k++) begin
      cv = cos_class(k / 8, j / 8);
      cu = cos_class(k % 8, j % 8);
      r[k].sign = cv[3] ^ cu[3];
      r[k].idx  = IDX_W'(pair_idx(int'(cv[2:0]), int'(cu[2:0])));
    end
    return r;
  endfunction

  localparam rom1_t ROM1 = make_rom1();

endpackage
