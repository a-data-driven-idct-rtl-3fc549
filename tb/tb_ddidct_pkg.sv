// tb_ddidct_pkg -- checks the constant tables built by the package against
// the IDCT basis computed here with $cos: for every output sample j and
// coefficient position k, the first-level ROM sign must equal the sign of
// C_k[j] and ROM1[index] must equal round(|C_k[j]| * 2^15). Also checks
// that all 28 magnitudes are distinct and fit in 13 bits.
module tb_ddidct_pkg;
  import ddidct_pkg::*;
  int checks = 0, failures = 0;

  function automatic real cf(input int w);
    return (w == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  initial begin
    for (int j = 0; j < 64; j++) begin
      rom0_t r0;
      r0 = make_rom0(j);
      for (int k = 0; k < 64; k++) begin
        real c;
        int  e;
        c = 0.25 * cf(k / 8) * cf(k % 8)
            * $cos((2 * (j / 8) + 1) * (k / 8) * 3.14159265358979323846 / 16.0)
            * $cos((2 * (j % 8) + 1) * (k % 8) * 3.14159265358979323846 / 16.0);
        e = int'($floor((c < 0.0 ? -c : c) * 32768.0 + 0.5));
        checks++;
        if (r0[k].sign != (c < 0.0) || int'(ROM1[r0[k].idx]) != e || int'(r0[k].idx) >= NMAG) begin
          failures++;
          $display("FAIL j=%0d k=%0d sign=%0d mag=%0d expected %0d/%0d",
                   j, k, r0[k].sign, ROM1[r0[k].idx], c < 0.0, e);
        end
      end
    end
    for (int a = 0; a < NMAG; a++)
      for (int b = a + 1; b < NMAG; b++) begin
        checks++;
        if (ROM1[a] == ROM1[b] || ROM1[a] == '0) begin
          failures++;
          $display("FAIL ROM1[%0d]=%0d ROM1[%0d]=%0d", a, ROM1[a], b, ROM1[b]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
