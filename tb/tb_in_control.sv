// tb_in_control -- feeds coefficient blocks (with idle gaps, zeros and
// negative zeros) and checks against a model kept here: each non-zero
// coefficient is written once, to the FIFO of the current half, with its
// position; zeros are never written; at the end of each block load equals
// the non-zero count, the halves swap, the next FIFO's write pointer is
// cleared and blk_tgl toggles. done_tgl is returned for the first blocks,
// then withheld, and overrun must rise exactly then.
module tb_in_control;
  import ddidct_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, din_valid = 1'b0, done_tgl = 1'b0;
  logic [11:0] din = '0;
  logic [1:0]  fifo_w, fifo_wclr;
  coef_entry_t fifo_d;
  logic [6:0]  load;
  logic        blk_tgl, overrun;
  int checks = 0, failures = 0;
  int half = 0, cnt = 0;

  always #5 clk = ~clk;

  in_control u_dut (.clk, .rst_n, .din_valid, .din, .fifo_w, .fifo_wclr,
                    .fifo_d, .load, .blk_tgl, .done_tgl, .overrun);

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < 12; b++) begin
      int nz_target;
      logic tgl_before;
      nz_target = (b == 1) ? 0 : (b == 2) ? 64 : int'($urandom_range(64, 0));
      cnt = 0;
      tgl_before = blk_tgl;
      for (int p = 0; p < 64; p++) begin
        logic [11:0] c;
        bit nz;
        if ($urandom_range(7, 0) == 0) begin
          din_valid = 1'b0; din = 12'($urandom);
          #1;
          checks++;
          if (fifo_w != 2'b00 || fifo_wclr != 2'b00) fail("write while idle");
          @(negedge clk);
        end
        nz = ($urandom_range(63, 0) < nz_target);
        c  = nz ? {1'($urandom), 11'($urandom_range(2047, 1))}
                : ($urandom_range(1, 0) ? 12'h800 : 12'h000);
        din_valid = 1'b1; din = c;
        #1;
        checks++;
        if (fifo_w != (nz ? (half == 0 ? 2'b01 : 2'b10) : 2'b00))
          fail($sformatf("fifo_w=%b at block %0d position %0d", fifo_w, b, p));
        if (nz) begin
          checks++;
          if (fifo_d.pos != 6'(p) || {fifo_d.sign, fifo_d.mag} != c)
            fail($sformatf("fifo_d=%h at position %0d", fifo_d, p));
          cnt++;
        end
        checks++;
        if (fifo_wclr != ((p == 63) ? (half == 0 ? 2'b10 : 2'b01) : 2'b00))
          fail($sformatf("fifo_wclr=%b at position %0d", fifo_wclr, p));
        @(negedge clk);
      end
      din_valid = 1'b0;
      half = 1 - half;
      checks += 2;
      if (int'(load) != cnt) fail($sformatf("load=%0d expected %0d", load, cnt));
      if (blk_tgl == tgl_before) fail("blk_tgl did not toggle");
      // hand-over of block b is the request for processing; it is
      // acknowledged for blocks 0..7 only
      if (b < 8) begin
        repeat (3) @(negedge clk);
        done_tgl = blk_tgl;
      end
      checks++;
      if (overrun != (b >= 9)) fail($sformatf("overrun=%0d after block %0d", overrun, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
