// tb_result_regs -- applies random and corner accumulator values (ties at
// .5, limits of the clipping range, far out of range) and checks the held
// samples against round-half-up and clip to -256..255 computed here, the
// one-cycle valid pulse and that pix holds without capture.
module tb_result_regs;
  logic clk = 1'b0, rst_n = 1'b0, capture = 1'b0;
  logic signed [63:0][30:0] acc;
  logic signed [63:0][8:0]  pix;
  logic valid;
  longint val [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  result_regs u_dut (.clk, .rst_n, .capture, .acc, .pix, .valid);

  function automatic int expect_pix(input longint a);
    longint r;
    r = a + 16384;
    r = (r >= 0) ? (r / 32768) : -((-r + 32767) / 32768);  // floor
    if (r > 255) return 255;
    if (r < -256) return -256;
    return int'(r);
  endfunction

  initial begin
    acc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      for (int j = 0; j < 64; j++) begin
        case ((t * 64 + j) % 9)
          0: val[j] = 16384;                       // +0.5 -> 1
          1: val[j] = -16384;                      // -0.5 -> 0
          2: val[j] = -16385;                      // just below -0.5 -> -1
          3: val[j] = 255 * 32768 + 16383;         // 255
          4: val[j] = 256 * 32768;                 // clipped to 255
          5: val[j] = -256 * 32768 - 16384;        // -256.5 -> -256
          6: val[j] = -(longint'(1) << 30);        // most negative
          default: val[j] = longint'($signed(31'($urandom))) >>> ($urandom_range(12, 0));
        endcase
        acc[j] = 31'(val[j]);
      end
      capture = 1'b1;
      @(negedge clk);
      capture = 1'b0;
      checks++;
      if (!valid) begin failures++; $display("FAIL valid missing"); end
      acc = '1;                                  // must not disturb pix
      @(negedge clk);
      checks++;
      if (valid) begin failures++; $display("FAIL valid longer than one cycle"); end
      for (int j = 0; j < 64; j++) begin
        checks++;
        if (int'($signed(pix[j])) != expect_pix(val[j])) begin
          failures++;
          $display("FAIL acc=%0d pix=%0d expected %0d", val[j], $signed(pix[j]), expect_pix(val[j]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
