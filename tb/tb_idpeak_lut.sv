// tb_idpeak_lut: sweeps A_d over 0 .. 1.1 and compares i_dpeak with a
// real-valued linear interpolation of the measured curve (17.5, 39, 48, 62,
// 77, 94.5, 117 A at A_d = k/6), allowing one LSB (1/16 A) for rounding.
// The seven points themselves must be hit exactly, and A_d above 1.0 must
// give the last point.
module tb_idpeak_lut;
  import lcp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  ad_t  ad = '0;
  ipk_t idpeak;
  int checks = 0, failures = 0;
  real curve [7] = '{17.5, 39.0, 48.0, 62.0, 77.0, 94.5, 117.0};

  idpeak_lut dut (.clk, .rst_n, .ad, .idpeak);

  always #5 clk = ~clk;

  function automatic real expect_amps(int unsigned a);
    real x, f;
    int  k;
    x = real'(a) / 1024.0 * 6.0;
    if (x >= 6.0) return curve[6];
    k = int'($floor(x));
    f = x - real'(k);
    return curve[k] + (curve[k+1] - curve[k]) * f;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int unsigned a = 0; a <= 1126; a++) begin
      real got, want;
      ad = ad_t'(a);
      @(negedge clk);
      got  = real'(idpeak) / 16.0;
      want = expect_amps(a);
      checks++;
      if (got > want + 1e-9 || got < want - 0.0625 - 1e-9) begin
        failures++;
        $display("FAIL A_d=%0d/1024: %f A, expected %f A", a, got, want);
      end
      // breakpoints are exact
      if ((a * 6) % 1024 == 0 || a >= 1024) begin
        checks++;
        if (got != want) begin
          failures++;
          $display("FAIL breakpoint A_d=%0d/1024: %f A, expected %f A", a, got, want);
        end
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
