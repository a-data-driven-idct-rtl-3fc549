// tb_supply_select -- exhaustive test of the LOAD-to-level mapping: every
// count 0..64 (and the unused codes up to 127) is applied and the level
// compared with the thresholds 16 / 32 / 48 computed here.
module tb_supply_select;
  logic [6:0] load;
  logic [1:0] level;
  int checks = 0, failures = 0;

  supply_select u_dut (.load, .level);

  initial begin
    for (int n = 0; n < 128; n++) begin
      int e;
      load = 7'(n);
      #1;
      e = (n <= 16) ? 0 : (n <= 32) ? 1 : (n <= 48) ? 2 : 3;
      checks++;
      if (int'(level) != e) begin
        failures++;
        $display("FAIL load=%0d level=%0d expected %0d", n, level, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
