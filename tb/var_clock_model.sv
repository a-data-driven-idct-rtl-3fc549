// var_clock_model -- behavioural model (not synthesizable) of the variable
// processing clock. The real part is a clock generator whose frequency
// tracks the critical path at the supply voltage chosen by level; here the
// period is simply picked per level so that a block with the largest count
// of its level (16, 32, 48 or 64 non-zero coefficients) is finished within
// 61 input-clock periods: period = 61 * P_IN_PS / (13*T + 8), T = 16*(level+1).
// slow forces a far too slow clock, used to provoke an overrun.
// The new period takes effect at the next rising edge.
module var_clock_model #(
  parameter int P_IN_PS = 10000
) (
  input  logic [1:0] level,
  input  logic       slow,
  output logic       pclk
);
  timeunit 1ns;
  timeprecision 1ps;

  function automatic real half_ns(input logic [1:0] lv, input logic sl);
    int t;
    t = 16 * (int'(lv) + 1);
    if (sl) return 61.0 * P_IN_PS / 2000.0 / 20.0;
    return (61.0 * P_IN_PS / real'(13 * t + 8)) / 2000.0;
  endfunction

  initial begin
    pclk = 1'b0;
    forever begin
      #(half_ns(level, slow)) pclk = 1'b1;
      #(half_ns(level, slow)) pclk = 1'b0;
    end
  end
endmodule
