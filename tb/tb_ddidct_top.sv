// tb_ddidct_top -- end-to-end test of the data-driven IDCT at its default
// sizes.
//
// A stream of 8x8 coefficient blocks is fed at one coefficient per clk
// cycle (with a few idle gaps). Blocks cover every non-zero count that
// matters: 0, 1, each supply-level boundary (16/17, 32/33, 48/49), 64,
// random counts, a negative zero, lowamp-amplitude blocks and full-scale
// blocks. pclk comes from a behavioural variable clock model driven by
// the design's own vdd_sel.
//
// Checks, per block:
//  * the 64 output samples equal a bit-exact model (13-bit constants
//    round(|C| * 2^15) computed here with $cos, exact products, rounding
//    half up, clipping to -256..255);
//  * for lowamp-amplitude blocks, each sample is within 1 of the ideal
//    real-valued IDCT (rounded and clipped);
//  * load equals the non-zero count and vdd_sel the expected level;
//  * the processing takes exactly 13 pclk cycles per non-zero coefficient
//    (first shift-register load to blk_done);
//  * no overrun while the clock follows vdd_sel.
// Finally the clock is forced far too slow and the overrun flag must rise.
// Every mechanism (zero skipping, both FIFOs read, all four levels, empty
// and full blocks, operand-latch hold, subtraction, overrun) is counted and
// must occur at least once.
module tb_ddidct_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int P_IN_PS = 10000;
  localparam int NBLK    = 32;

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

  function automatic blk_t gen_block(input int nnz, input int amp, input bit negzero);
    blk_t b;
    int   perm [64];
    for (int i = 0; i < 64; i++) begin b.c[i] = '0; perm[i] = i; end
    for (int i = 63; i > 0; i--) begin
      int r, t;
      r = int'($urandom_range(i, 0));
      t = perm[i]; perm[i] = perm[r]; perm[r] = t;
    end
    for (int i = 0; i < nnz; i++) begin
      int m;
      m = int'($urandom_range(amp, 1));
      b.c[perm[i]] = {1'($urandom_range(1, 0)), 11'(m)};
    end
    if (negzero && nnz < 64) b.c[perm[63]] = 12'h800;
    b.nnz   = nnz;
    b.lowamp = (amp <= 128);
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
        b = exp_q.pop_front();
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
  int plan_n [16] = '{0, 1, 64, 5, 16, 17, 32, 33, 48, 49, 64, 64, 2, 9, 24, 0};
  int plan_a [16] = '{1, 50, 2047, 300, 100, 100, 60, 60, 40, 40, 30, 2047, 2047, 120, 80, 1};

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < NBLK; i++) begin
      blk_t b;
      if (i < 16) b = gen_block(plan_n[i], plan_a[i], i == 3);
      else        b = gen_block(int'($urandom_range(64, 0)),
                                ($urandom_range(1, 0) != 0) ? 2047 : 100, 1'b0);
      send_block(b);
    end
    // let the last block finish
    repeat (200) @(negedge clk);
    checks++;
    if (overrun) begin
      failures++;
      $display("FAIL overrun with the clock following vdd_sel");
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d blocks never came out", exp_q.size());
    end
    // provoke an overrun with a far too slow processing clock
    slow = 1'b1;
    begin
      blk_t b;
      b = gen_block(64, 100, 1'b0);
      send_block(b);
      send_block(b);
      send_block(b);
    end
    @(negedge clk);
    checks++;
    if (overrun) n_overrun++;
    else begin
      failures++;
      $display("FAIL overrun not flagged with a too slow clock");
    end
    // every mechanism must have happened
    begin
      int cnt [10];
      string nm [10];
      cnt = '{n_skip, n_empty, n_full, n_lvl[0], n_lvl[1], n_lvl[2], n_lvl[3],
              n_hold, n_sub, n_fifo[1] > 0 ? n_fifo[0] : 0};
      nm  = '{"zero skip", "empty block", "full block", "level 0", "level 1",
              "level 2", "level 3", "latch hold", "subtract", "both FIFOs"};
      for (int i = 0; i < 10; i++) begin
        checks++;
        $display("mechanism %-12s : %0d", nm[i], cnt[i]);
        if (cnt[i] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", nm[i]);
        end
      end
      $display("mechanism overrun      : %0d", n_overrun);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
