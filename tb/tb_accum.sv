// tb_accum -- four accumulators (output samples 0, 1, 27 and 63) on one
// coefficient bus. The testbench plays the part of the sequencer and the
// coefficient shift register: for each random coefficient it presents
// position and sign with load, then the magnitude shifted left by i in
// cycle i (i = 0..12), loading the next coefficient in the 13th cycle.
// Expected sums use constants round(|C_k[j]| * 2^15) with the sign of C_k[j],
// computed here with $cos. Checked: the sum after every coefficient (so
// the multiply must finish in exactly 13 cycles), that the sum holds while
// idle, and that clr empties it.
module tb_accum;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NJ = 4;
  localparam int JS [NJ] = '{0, 1, 27, 63};

  logic        clk = 1'b0, rst_n = 1'b0, clr = 1'b0, load = 1'b0, sign = 1'b0;
  logic [5:0]  pos = '0;
  logic [22:0] cmag = '0;
  logic signed [30:0] acc [NJ];
  longint      expv [NJ];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NJ; g++) begin : g_dut
    accum #(.J(JS[g])) u_dut (
      .clk, .rst_n, .clr, .load, .pos, .coeff_sign(sign), .coeff_mag(cmag), .acc(acc[g])
    );
  end

  function automatic longint kq(input int k, input int j);
    real c, a;
    longint r;
    c = ((k / 8 == 0) ? 1.0 / $sqrt(2.0) : 1.0) * ((k % 8 == 0) ? 1.0 / $sqrt(2.0) : 1.0) * 0.25
        * $cos((2 * (j / 8) + 1) * (k / 8) * 3.14159265358979323846 / 16.0)
        * $cos((2 * (j % 8) + 1) * (k % 8) * 3.14159265358979323846 / 16.0);
    a = (c < 0.0 ? -c : c) * 32768.0;
    r = longint'($floor(a + 0.5));
    return (c < 0.0) ? -r : r;
  endfunction

  task automatic check_all(input string what);
    for (int g = 0; g < NJ; g++) begin
      checks++;
      if (longint'(acc[g]) != expv[g]) begin
        failures++;
        $display("FAIL %s: acc[J=%0d]=%0d expected %0d", what, JS[g], acc[g], expv[g]);
      end
    end
  endtask

  // run a burst of n coefficients back to back
  task automatic burst(input int n);
    int          k, k2;
    logic [10:0] m, m2;
    logic        s, s2;
    k = int'($urandom_range(63, 0)); m = 11'($urandom); s = 1'($urandom);
    k2 = k; m2 = m; s2 = s;
    // load cycle of the first coefficient
    pos = 6'(k); sign = s; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    for (int c = 0; c < n; c++) begin
      for (int i = 0; i < 13; i++) begin
        cmag = 23'(m) << i;
        if (i == 12 && c != n - 1) begin
          // the next coefficient is loaded in the 13th cycle
          k2 = int'($urandom_range(63, 0)); m2 = 11'($urandom); s2 = 1'($urandom);
          pos = 6'(k2); sign = s2; load = 1'b1;
        end
        @(negedge clk);
        load = 1'b0;
      end
      for (int g = 0; g < NJ; g++)
        expv[g] += (s ? -1 : 1) * longint'(m) * kq(k, JS[g]);
      check_all("after coefficient");
      k = k2; m = m2; s = s2;
    end
  endtask

  initial begin
    for (int g = 0; g < NJ; g++) expv[g] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_all("after reset");
    for (int b = 0; b < 12; b++) begin
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      for (int g = 0; g < NJ; g++) expv[g] = 0;
      check_all("after clr");
      burst(int'($urandom_range(10, 1)));
      cmag = 23'($urandom);            // bus noise while idle
      repeat (5) @(negedge clk);
      check_all("idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
