// tb_lc_filter: runs two filter instances, the default 2 kHz resonance and a
// 20 kHz one, on a pulsed input like the modelled discharge current (bursts
// of one- or two-sample pulses whose height changes from burst to burst,
// with quiet gaps), and compares y after every strobe with a double-precision
// evaluation of
//   y[n] = 2 y[n-1] - 2 b y[n-1] - y[n-2] + b (x[n-1] + x[n-2])
// kept by the testbench. The tolerance is 4 output LSBs (1 mA). Strobes come
// at irregular intervals; between strobes y must not move. The run also
// checks that the input takes effect one strobe late and that the output
// rings above the input level after a step (no damping).
module tb_lc_filter;
  import lcp_pkg::*;
  localparam int unsigned BA = FILT_B_DEF;   // 2 kHz at T_m = 640 ns
  localparam int unsigned BB = 3470687;      // 20 kHz at T_m = 640 ns
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  ipk_t x = '0;
  io_t  ya, yb;
  int checks = 0, failures = 0;
  real ra1 = 0, ra2 = 0, rb1 = 0, rb2 = 0, x1 = 0, x2 = 0;
  real peak_b = 0;
  int  nstrobe = 0;

  lc_filter #(.B(BA)) dut_a (.clk, .rst_n, .en, .x, .y(ya));
  lc_filter #(.B(BB)) dut_b (.clk, .rst_n, .en, .x, .y(yb));

  always #5 clk = ~clk;

  function automatic real step(real y1, real y2, real b, real xa, real xb);
    return 2.0 * y1 - 2.0 * b * y1 - y2 + b * (xa + xb);
  endfunction

  task automatic compare(input io_t y, input real r, input string name);
    real got;
    got = real'(y) / 4096.0;
    checks++;
    if (got - r > 4.0 / 4096.0 || r - got > 4.0 / 4096.0) begin
      failures++;
      if (failures < 20) $display("FAIL %s strobe %0d: %f, expected %f y1=%0d", name, nstrobe, got, r, dut_a.y1);
    end
  endtask

  // one strobe with input value xv (amperes * 16)
  task automatic strobe(input int unsigned xv);
    real na, nb, ba, bb;
    io_t hold_a;
    ba = real'(BA) / 1073741824.0;
    bb = real'(BB) / 1073741824.0;
    x  = ipk_t'(xv);
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    na = step(ra1, ra2, ba, x1, x2);
    nb = step(rb1, rb2, bb, x1, x2);
    ra2 = ra1; ra1 = na; rb2 = rb1; rb1 = nb;
    x2 = x1; x1 = real'(xv) / 16.0;
    nstrobe++;
    compare(ya, ra1, "2kHz");
    compare(yb, rb1, "20kHz");
    if (rb1 > peak_b) peak_b = rb1;
    hold_a = ya;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    checks++;
    if (ya !== hold_a) begin failures++; $display("FAIL y moved between strobes"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // first sample only shows one strobe later
    strobe(16 * 100);
    checks++;
    if (ya !== '0 || yb !== '0) begin failures++; $display("FAIL output moved on its own strobe"); end
    strobe(0);
    checks++;
    if (ya == '0 || yb == '0) begin failures++; $display("FAIL output did not follow one strobe later"); end
    // pulsed discharge current, bursts of changing height
    for (int burst = 0; burst < 60; burst++) begin
      int unsigned h;
      h = (burst % 5 == 4) ? 0 : $urandom_range(200, 1900);
      for (int p = 0; p < 40; p++) begin
        strobe(h);
        if ($urandom_range(0, 1) != 0) strobe(h);
        repeat (6) strobe(0);
      end
    end
    // constant input: the undamped filter rings up to twice the step
    peak_b = 0;
    for (int k = 0; k < 400; k++) strobe(16 * 10);
    checks++;
    if (peak_b < 12.0) begin failures++; $display("FAIL no overshoot after step, peak %f", peak_b); end
    $display("strobes=%0d 20kHz peak after 10 A step=%f A", nstrobe, peak_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
