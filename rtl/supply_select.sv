// supply_select -- maps the block's non-zero count LOAD (0..64) onto one of
// four supply / clock levels for the processing section:
//   level 0 (1.5 V)  LOAD <= TH0 (16)
//   level 1 (2.7 V)  LOAD <= TH1 (32)
//   level 2 (3.9 V)  LOAD <= TH2 (48)
//   level 3 (5.0 V)  otherwise
// Combinational. The four levels and the thresholds 16/32/48 come from the
// original architecture; which side of a threshold a count equal to it falls on is this
// implementation's choice (equal goes to the lower level, since a level-k
// clock is sized for TH_k coefficients). The voltages themselves are
// produced by an external converter driven by level.
module supply_select
  import ddidct_pkg::*;
#(
  parameter int TH0 = 16,
  parameter int TH1 = 32,
  parameter int TH2 = 48
) (
  input  logic [LOAD_W-1:0] load,
  output logic [1:0]        level
);
  always_comb begin
    if      (int'(load) <= TH0) level = 2'd0;
    else if (int'(load) <= TH1) level = 2'd1;
    else if (int'(load) <= TH2) level = 2'd2;
    else                        level = 2'd3;
  end
endmodule
