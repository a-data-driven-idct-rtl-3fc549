// tb_coef_shift_reg -- loads random 11-bit magnitudes and checks that the
// output is mag * 2^i in each of the 13 cycles that follow, that the
// register holds while shift is low, and that load wins over shift.
module tb_coef_shift_reg;
  logic        clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  logic [10:0] mag = '0;
  logic [22:0] coeff_mag;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  coef_shift_reg u_dut (.clk, .rst_n, .load, .shift, .mag, .coeff_mag);

  task automatic check(input logic [22:0] e);
    checks++;
    if (coeff_mag !== e) begin
      failures++;
      $display("FAIL coeff_mag=%h expected %h", coeff_mag, e);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check('0);
    for (int t = 0; t < 40; t++) begin
      logic [10:0] m;
      m = (t == 0) ? 11'h7ff : 11'($urandom);
      mag = m; load = 1'b1; shift = 1'b1;   // load has priority
      @(negedge clk);
      load = 1'b0;
      for (int i = 0; i < 13; i++) begin
        check(23'(m) << i);
        if (i == 6 && t[0]) begin           // hold for two cycles
          shift = 1'b0;
          repeat (2) @(negedge clk);
          check(23'(m) << i);
          shift = 1'b1;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
