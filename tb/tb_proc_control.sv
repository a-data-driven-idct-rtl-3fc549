// tb_proc_control -- the sequencer with two FIFO models kept here. Blocks
// of 0..64 entries are written alternately into the two models and handed
// over with a toggle of blk_tgl. Checked per block: acc_clr once before
// the first load, the entries come out on the bus in order and from the
// right FIFO, one load per entry, exactly 13 cycles between loads and 13
// shift cycles per entry, blk_done 14 cycles after the last load (right
// after acc_clr for an empty block), done_tgl toggles once, busy drops.
module tb_proc_control;
  import ddidct_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, blk_tgl = 1'b0;
  logic [6:0]  load = '0;
  coef_entry_t fifo0_q, fifo1_q;
  logic [1:0]  fifo_r, fifo_rclr;
  logic [5:0]  bus_pos;
  logic        bus_sign;
  logic [10:0] bus_mag;
  logic        ld, shift, acc_clr, blk_done, done_tgl, busy;

  coef_entry_t mem [2][64];
  int          rp  [2] = '{0, 0};
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign fifo0_q = mem[0][rp[0] % 64];
  assign fifo1_q = mem[1][rp[1] % 64];

  always @(posedge clk)
    for (int f = 0; f < 2; f++)
      if (fifo_rclr[f])   rp[f] <= 0;
      else if (fifo_r[f]) rp[f] <= rp[f] + 1;

  proc_control u_dut (.clk, .rst_n, .blk_tgl, .load, .fifo0_q, .fifo1_q,
                      .fifo_r, .fifo_rclr, .bus_pos, .bus_sign, .bus_mag,
                      .ld, .shift, .acc_clr, .blk_done, .done_tgl, .busy);

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < 14; b++) begin
      int   n, f, nld, nsh, since, cyc;
      bit   seen_clr, done;
      logic dt;
      f = b % 2;
      n = (b == 0) ? 1 : (b == 1) ? 0 : (b == 2) ? 64 : int'($urandom_range(64, 0));
      for (int i = 0; i < 64; i++) mem[f][i] = coef_entry_t'(18'($urandom));
      load = 7'(n);
      dt = done_tgl;
      blk_tgl = ~blk_tgl;
      nld = 0; nsh = 0; since = 0; seen_clr = 0; done = 0; cyc = 0;
      while (!done && cyc < 2000) begin
        #1;
        if (acc_clr) begin
          checks++;
          if (seen_clr || nld != 0) fail("acc_clr out of place");
          seen_clr = 1;
          checks++;
          if (fifo_rclr != (f == 0 ? 2'b01 : 2'b10)) fail("wrong FIFO cleared");
        end
        if (ld) begin
          checks += 3;
          if (!seen_clr) fail("load before acc_clr");
          if (nld > 0 && since != 13) fail($sformatf("%0d cycles between loads", since));
          if (nld < n && (bus_pos != mem[f][nld].pos || bus_sign != mem[f][nld].sign ||
                          bus_mag != mem[f][nld].mag))
            fail($sformatf("block %0d entry %0d wrong on the bus", b, nld));
          if (fifo_r != (f == 0 ? 2'b01 : 2'b10)) fail("wrong FIFO read");
          nld++;
          since = 0;
        end
        if (shift) nsh++;
        if (blk_done) begin
          done = 1;
          checks += 3;
          if (nld != n) fail($sformatf("%0d loads for %0d entries", nld, n));
          if (nsh != 13 * n) fail($sformatf("%0d shift cycles for %0d entries", nsh, n));
          // the 13th cycle after the last load accumulates its last bit;
          // blk_done follows in the next cycle
          if (n > 0 && since != 14) fail($sformatf("blk_done %0d cycles after the last load", since));
        end
        @(negedge clk);
        since++;
        cyc++;
      end
      checks += 3;
      if (!done) fail("block never finished");
      if (done_tgl == dt) fail("done_tgl did not toggle");
      if (busy) fail("still busy");
      repeat ($urandom_range(5, 0)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
