// tb_coef_fifo -- writes blocks of random length on one clock and reads
// them back on an unrelated second clock after the write side is done,
// checking every word in order (show-ahead q), that wclr and rclr restart
// the pointers, and that q holds while r is low.
module tb_coef_fifo;
  timeunit 1ns;
  timeprecision 1ps;

  logic        wclk = 1'b0, rclk = 1'b0, rst_n = 1'b0;
  logic        wclr = 1'b0, w = 1'b0, rclr = 1'b0, r = 1'b0;
  logic [17:0] d = '0, q;
  logic [17:0] ref_q [$];
  int checks = 0, failures = 0;

  always #5    wclk = ~wclk;
  always #1.7  rclk = ~rclk;

  coef_fifo u_dut (.wclk, .wrst_n(rst_n), .wclr, .w, .d,
                   .rclk, .rrst_n(rst_n), .rclr, .r, .q);

  initial begin
    repeat (2) @(negedge wclk);
    rst_n = 1'b1;
    for (int b = 0; b < 20; b++) begin
      int n;
      n = (b == 0) ? 64 : int'($urandom_range(64, 1));
      ref_q.delete();
      @(negedge wclk);
      wclr = 1'b1;
      @(negedge wclk);
      wclr = 1'b0;
      for (int i = 0; i < n; i++) begin
        w = ($urandom_range(3, 0) != 0);
        d = 18'($urandom);
        if (w) ref_q.push_back(d);
        else   i--;
        @(negedge wclk);
      end
      w = 1'b0;
      d = '1;
      // read side
      @(negedge rclk);
      rclr = 1'b1;
      @(negedge rclk);
      rclr = 1'b0;
      for (int i = 0; i < n; i++) begin
        checks++;
        if (q !== ref_q[i]) begin
          failures++;
          $display("FAIL block %0d word %0d: q=%h expected %h", b, i, q, ref_q[i]);
        end
        if ($urandom_range(3, 0) == 0) begin   // a cycle without r
          @(negedge rclk);
          checks++;
          if (q !== ref_q[i]) begin failures++; $display("FAIL q moved without r"); end
        end
        r = 1'b1;
        @(negedge rclk);
        r = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
