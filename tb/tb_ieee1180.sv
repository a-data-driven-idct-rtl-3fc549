// tb_ieee1180 -- accuracy test in the manner of IEEE Std 1180-1990 on the
// complete design at its default sizes.
//
// For each of three input ranges (-256..255, -5..5, -300..300) NBLK random
// 8x8 sample blocks are made, transformed with a double-precision forward
// DCT, rounded to integers and clamped to the coefficient range (-2047..2047,
// the 12-bit sign-magnitude limit), then streamed through the design. Each
// output block is compared with the double-precision IDCT of the same
// coefficients, rounded and clipped to -256..255. The statistics of the
// standard are accumulated and checked against its limits:
//   peak error <= 1, per-position mean square error <= 0.06,
//   overall mean square error <= 0.02, per-position mean error <= 0.015,
//   overall mean error <= 0.0015,
// and an all-zero block must give an all-zero output. The random numbers
// come from $urandom, not from the generator defined by the standard, so
// the statistics are comparable but not identical to a formal compliance run.
module tb_ieee1180;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int P_IN_PS = 10000;
  localparam int NBLK    = 10000;
  localparam real PI     = 3.14159265358979323846;

  logic        clk = 1'b0, rst_n = 1'b0, din_valid = 1'b0;
  logic [11:0] din = '0;
  logic [6:0]  load;
  logic [1:0]  vdd_sel;
  logic signed [63:0][8:0] pix;
  logic        pclk, pix_valid, overrun, busy;

  int checks = 0, failures = 0;

  always #(P_IN_PS / 2000.0) clk = ~clk;

  var_clock_model #(.P_IN_PS(P_IN_PS)) u_clk (.level(vdd_sel), .slow(1'b0), .pclk);

  ddidct_top u_dut (
    .clk, .pclk, .rst_n, .din_valid, .din, .load, .vdd_sel,
    .pix, .pix_valid, .overrun, .busy
  );

  real basis [8][8];   // basis[x][u] = c(u)/2 * cos((2x+1) u pi/16)

  initial
    for (int x = 0; x < 8; x++)
      for (int u = 0; u < 8; u++)
        basis[x][u] = ((u == 0) ? 1.0 / $sqrt(2.0) : 1.0) / 2.0
                      * $cos((2 * x + 1) * u * PI / 16.0);

  typedef int blk_t [64];

  // reference outputs waiting for the design
  blk_t ref_q [$];

  // statistics
  longint se   [64];
  longint me   [64];
  longint nblocks = 0;
  int     peak = 0;

  function automatic int clip(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int rnd(input real r);
    return int'($floor(r + 0.5));
  endfunction

  task automatic send(input blk_t c);
    for (int i = 0; i < 64; i++) begin
      din_valid = 1'b1;
      din       = (c[i] < 0) ? {1'b1, 11'(-c[i])} : {1'b0, 11'(c[i])};
      @(negedge clk);
    end
    din_valid = 1'b0;
  endtask

  task automatic run_block(input int lo, input int hi, input bit zero);
    blk_t s, c, r;
    real  t [8][8];
    for (int i = 0; i < 64; i++)
      s[i] = zero ? 0 : lo + int'($urandom_range(hi - lo, 0));
    // forward DCT: rows then columns
    for (int m = 0; m < 8; m++)
      for (int u = 0; u < 8; u++) begin
        t[m][u] = 0.0;
        for (int n = 0; n < 8; n++) t[m][u] += basis[n][u] * real'(s[8 * m + n]);
      end
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        real a;
        a = 0.0;
        for (int m = 0; m < 8; m++) a += basis[m][v] * t[m][u];
        c[8 * v + u] = clip(rnd(a), -2047, 2047);
      end
    // reference IDCT of the integer coefficients
    for (int m = 0; m < 8; m++)
      for (int u = 0; u < 8; u++) begin
        t[m][u] = 0.0;
        for (int v = 0; v < 8; v++) t[m][u] += basis[m][v] * real'(c[8 * v + u]);
      end
    for (int m = 0; m < 8; m++)
      for (int n = 0; n < 8; n++) begin
        real a;
        a = 0.0;
        for (int u = 0; u < 8; u++) a += basis[n][u] * t[m][u];
        r[8 * m + n] = clip(rnd(a), -256, 255);
      end
    ref_q.push_back(r);
    send(c);
  endtask

  always @(posedge pclk) begin
    if (rst_n && pix_valid) begin
      if (ref_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output block");
      end else begin
        blk_t r;
        r = ref_q[0];
        ref_q.delete(0);
        nblocks++;
        for (int j = 0; j < 64; j++) begin
          int e;
          e = int'($signed(pix[j])) - r[j];
          se[j] += e * e;
          me[j] += e;
          if (e > peak) peak = e;
          if (-e > peak) peak = -e;
        end
      end
    end
  end

  task automatic evaluate(input string name);
    real omse, ome, wpmse, wpme;
    longint tse, tme;
    tse = 0; tme = 0; wpmse = 0.0; wpme = 0.0;
    for (int j = 0; j < 64; j++) begin
      real p, q;
      tse += se[j]; tme += me[j];
      p = real'(se[j]) / real'(nblocks);
      q = real'(me[j]) / real'(nblocks);
      if (p > wpmse) wpmse = p;
      if ((q < 0.0 ? -q : q) > wpme) wpme = (q < 0.0 ? -q : q);
    end
    omse = real'(tse) / (64.0 * real'(nblocks));
    ome  = real'(tme) / (64.0 * real'(nblocks));
    $display("range %s: %0d blocks, peak %0d, worst pmse %f, omse %f, worst pme %f, ome %f",
             name, nblocks, peak, wpmse, omse, wpme, ome);
    checks += 6;
    if (nblocks != NBLK) begin failures++; $display("FAIL %0d blocks came out", nblocks); end
    if (peak > 1)        begin failures++; $display("FAIL peak error %0d", peak); end
    if (wpmse > 0.06)    begin failures++; $display("FAIL pmse %f", wpmse); end
    if (omse > 0.02)     begin failures++; $display("FAIL omse %f", omse); end
    if (wpme > 0.015)    begin failures++; $display("FAIL pme %f", wpme); end
    if ((ome < 0.0 ? -ome : ome) > 0.0015) begin failures++; $display("FAIL ome %f", ome); end
  endtask

  task automatic reset_stats();
    for (int j = 0; j < 64; j++) begin se[j] = 0; me[j] = 0; end
    nblocks = 0; peak = 0;
  endtask

  int lo_t [3] = '{-256, -5, -300};
  int hi_t [3] = '{255, 5, 300};

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int g = 0; g < 3; g++) begin
      reset_stats();
      for (int b = 0; b < NBLK; b++) run_block(lo_t[g], hi_t[g], 1'b0);
      repeat (100) @(negedge clk);
      evaluate($sformatf("%0d..%0d", lo_t[g], hi_t[g]));
    end
    // all-zero input
    reset_stats();
    run_block(0, 0, 1'b1);
    repeat (100) @(negedge clk);
    checks++;
    if (nblocks != 1 || peak != 0 || pix != '0) begin
      failures++;
      $display("FAIL all-zero block");
    end
    checks++;
    if (overrun) begin failures++; $display("FAIL overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * NBLK * 64 + 20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
