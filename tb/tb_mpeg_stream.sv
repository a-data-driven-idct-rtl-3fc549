// tb_mpeg_stream -- the design on a sparse, video-like coefficient stream
// at its default sizes: 1000 blocks whose non-zero counts follow a
// decaying distribution with a mean near 6.4 per block (most blocks have
// only a few coefficients, a few have many), placed mostly at low
// frequencies, with amplitudes falling with frequency. This is a
// synthetic stand-in for a real MPEG-2 stream, generated with $urandom.
//
// Checked per block: all 64 samples bit-exact against the 13-bit-constant
// model and within 1 of the ideal IDCT, load and vdd_sel, 13 cycles per
// non-zero coefficient plus one FETCH cycle, and no overrun. Reported:
// the average number of non-zero coefficients, additions (accumulator
// cycles with an enabled add), ROM and FIFO accesses and processing
// cycles per block, and how often each supply level was chosen.
module tb_mpeg_stream;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int P_IN_PS = 10000;
  localparam int NBLK    = 1000;

  logic        clk = 1'b0, rst_n = 1'b0, din_valid = 1'b0, slow = 1'b0;
  logic [11:0] din = '0;
  logic [6:0]  load;
  logic [1:0]  vdd_sel;
  logic signed [63:0][8:0] pix;
  logic        pclk, pix_valid, overrun, busy;

  int checks = 0, failures = 0;

  always #(P_IN_PS / 2000.0) clk = ~clk;

  var_clock_model #(.P_IN_PS(P_IN_PS)) u_clk (.level(vdd_sel), .slow, .pclk);

  ddidct_top u_dut (
    .clk, .pclk, .rst_n, .din_valid, .din, .load, .vdd_sel,
    .pix, .pix_valid, .overrun, .busy
  );

  // ---------------- reference model ----------------
  real    cst  [64][64];   // cst[k][j]: ideal constant
  longint kq   [64][64];   // signed 13-bit quantised constant, units 2^-15

  function automatic real cf(input int w);
    return (w == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  initial begin
    for (int k = 0; k < 64; k++)
      for (int j = 0; j < 64; j++) begin
        real c, a;
        c = 0.25 * cf(k / 8) * cf(k % 8)
            * $cos((2 * (j / 8) + 1) * (k / 8) * 3.14159265358979323846 / 16.0)
            * $cos((2 * (j % 8) + 1) * (k % 8) * 3.14159265358979323846 / 16.0);
        cst[k][j] = c;
        a = (c < 0.0 ? -c : c) * 32768.0;
        kq[k][j] = longint'($floor(a + 0.5));
        if (c < 0.0) kq[k][j] = -kq[k][j];
      end
  end

  function automatic int sm2int(input logic [11:0] v);
    return v[11] ? -int'(v[10:0]) : int'(v[10:0]);
  endfunction

  function automatic int clip(input longint v);
    if (v > 255)  return 255;
    if (v < -256) return -256;
    return int'(v);
  endfunction

  // ---------------- stimulus bookkeeping ----------------
  typedef struct {
    logic [11:0] c [64];
    int          nnz;
    bit          lowamp;
  } blk_t;

  blk_t exp_q [$];
  int   nnz_q [$];           // counts waiting for the load check
  int   cyc_q [$];           // counts waiting for the cycle check

  // mechanism counters
  int n_skip = 0, n_empty = 0, n_full = 0, n_hold = 0, n_sub = 0, n_overrun = 0;
  int n_lvl [4] = '{0, 0, 0, 0};
  int n_fifo [2] = '{0, 0};

  function automatic int geo(input real mean);
    real r;
    r = (real'($urandom_range(1000000, 1))) / 1000000.0;
    return int'($floor(-mean * $ln(r)));
  endfunction

  function automatic blk_t gen_block();
    blk_t b;
    int   nnz;
    nnz = 1 + geo(5.4);
    if (nnz > 64) nnz = 64;
    for (int i = 0; i < 64; i++) b.c[i] = '0;
    for (int i = 0; i < nnz; i++) begin
      int u, v, amp, tries;
      tries = 0;
      do begin
        u = (tries < 20) ? geo(1.5) % 8 : int'($urandom_range(7, 0));
        v = (tries < 20) ? geo(1.5) % 8 : int'($urandom_range(7, 0));
        tries++;
      end while (b.c[8 * v + u] != '0);
      amp = 1 + geo(300.0 / real'(1 + u + v));
      if (amp > 2047) amp = 2047;
      b.c[8 * v + u] = {1'($urandom_range(1, 0)), 11'(amp)};
    end
    b.nnz    = nnz;
    b.lowamp = 1'b1;
    return b;
  endfunction

  task automatic send_block(input blk_t b);
    exp_q.push_back(b);
    nnz_q.push_back(b.nnz);
    cyc_q.push_back(b.nnz);
    for (int i = 0; i < 64; i++) begin
      if ($urandom_range(15, 0) == 0) begin
        din_valid = 1'b0;
        @(negedge clk);
      end
      din_valid = 1'b1;
      din       = b.c[i];
      @(negedge clk);
    end
    din_valid = 1'b0;
  endtask

  // ---------------- checkers ----------------
  // load / vdd_sel are updated on the clock edge that takes position 63
  always @(posedge clk) begin
    if (rst_n && din_valid && u_dut.u_in.pos == 6'd63) begin
      #1;
      if (nnz_q.size() != 0) begin
        int n, lv;
        n  = nnz_q.pop_front();
        lv = (n <= 16) ? 0 : (n <= 32) ? 1 : (n <= 48) ? 2 : 3;
        checks++;
        if (int'(load) != n || int'(vdd_sel) != lv) begin
          failures++;
          $display("FAIL load=%0d vdd_sel=%0d expected %0d/%0d", load, vdd_sel, n, lv);
        end
        n_lvl[lv]++;
        if (n == 0)  n_empty++;
        if (n == 64) n_full++;
        if (n < 64)  n_skip++;
      end
    end
  end

  // processing cycles: from the first load to blk_done
  int  pcyc = 0;
  bit  counting = 1'b0;
  always @(posedge pclk) begin
    if (u_dut.u_ctl.acc_clr) begin
      pcyc = 0; counting = 1'b1;
      n_fifo[u_dut.u_ctl.rsel]++;
    end else if (counting && u_dut.u_ctl.blk_done) begin
      counting = 1'b0;
      if (cyc_q.size() != 0 && !slow) begin
        int n;
        n = cyc_q.pop_front();
        checks++;
        // one FETCH cycle, then 13 cycles per coefficient; n = 0 gives 0
        if (pcyc != ((n == 0) ? 0 : 13 * n + 1)) begin
          failures++;
          $display("FAIL processing took %0d pclk cycles for %0d coefficients", pcyc, n);
        end
      end
    end else if (counting && (u_dut.u_ctl.ld || u_dut.u_ctl.shift)) begin
      pcyc++;
    end
    if (u_dut.u_ctl.shift && !u_dut.g_acc[0].u_acc.ksr[0]) n_hold++;
    if (u_dut.g_acc[0].u_acc.ksr[0] && u_dut.g_acc[0].u_acc.neg) n_sub++;
  end

  always @(posedge pclk) begin
    if (rst_n && pix_valid && !slow) begin
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output block");
      end else begin
        blk_t b;
        int   bad_exact, bad_ideal;
        b = exp_q[0];
        exp_q.delete(0);
        bad_exact = 0; bad_ideal = 0;
        for (int j = 0; j < 64; j++) begin
          longint s;
          real    r;
          int     e, ideal;
          s = 0; r = 0.0;
          for (int k = 0; k < 64; k++) begin
            s += longint'(sm2int(b.c[k])) * kq[k][j];
            r += real'(sm2int(b.c[k])) * cst[k][j];
          end
          e     = clip((s + 16384) >>> 15);
          ideal = clip(longint'($floor(r + 0.5)));
          checks++;
          if (int'($signed(pix[j])) != e) begin
            bad_exact++;
            failures++;
            if (bad_exact <= 3)
              $display("FAIL sample %0d = %0d, expected %0d", j, $signed(pix[j]), e);
          end
          if (b.lowamp) begin
            checks++;
            if (int'($signed(pix[j])) - ideal > 1 || ideal - int'($signed(pix[j])) > 1) begin
              bad_ideal++;
              failures++;
              if (bad_ideal <= 3)
                $display("FAIL sample %0d = %0d, ideal %0d", j, $signed(pix[j]), ideal);
            end
          end
        end
      end
    end
  end

  // ---------------- main sequence ----------------
  longint n_add = 0, n_nnz = 0, n_pcyc = 0;

  for (genvar g = 0; g < 64; g++) begin : g_cnt
    always @(posedge pclk) if (u_dut.g_acc[g].u_acc.ksr[0]) n_add++;
  end
  always @(posedge pclk) if (u_dut.u_ctl.busy) n_pcyc++;

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < NBLK; i++) begin
      blk_t b;
      b = gen_block();
      n_nnz += b.nnz;
      send_block(b);
    end
    repeat (200) @(negedge clk);
    checks += 2;
    if (overrun) begin
      failures++;
      $display("FAIL overrun");
    end
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d blocks never came out", exp_q.size());
    end
    $display("blocks %0d: non-zero coefficients per block %f", NBLK, real'(n_nnz) / NBLK);
    $display("per block: additions %f, ROM accesses %f, FIFO accesses %f, busy pclk cycles %f",
             real'(n_add) / NBLK, 128.0 * real'(n_nnz) / NBLK, 2.0 * real'(n_nnz) / NBLK,
             real'(n_pcyc) / NBLK);
    $display("supply levels chosen: %0d %0d %0d %0d", n_lvl[0], n_lvl[1], n_lvl[2], n_lvl[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (NBLK * 80 + 2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
