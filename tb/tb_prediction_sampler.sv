// tb_prediction_sampler: random X and Y filter outputs, including values that
// overflow the sum in both directions. The live sum must be the saturated sum
// computed here in 64-bit integers; the sampled value must change only on the
// T_s strobe, take the sum of that cycle, and be flagged valid one cycle.
module tb_prediction_sampler;
  import lcp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, ts_tick = 1'b0, iop_s_valid;
  io_t  iox = '0, ioy = '0, iop, iop_s;
  int checks = 0, failures = 0, n_sat = 0, n_samples = 0;
  longint exp_s = 0;

  prediction_sampler dut (.clk, .rst_n, .ts_tick, .iox, .ioy, .iop, .iop_s, .iop_s_valid);

  always #5 clk = ~clk;

  function automatic longint sat_sum(io_t a, io_t b);
    longint s, hi, lo;
    hi = (longint'(1) << (IO_W - 1)) - 1;
    lo = -(longint'(1) << (IO_W - 1));
    s = longint'(a) + longint'(b);
    return (s > hi) ? hi : (s < lo) ? lo : s;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      logic was_tick;
      if ($urandom_range(0, 3) == 0) begin
        iox = io_t'($urandom);
        ioy = io_t'($urandom);
      end else begin
        iox = io_t'($signed($urandom_range(0, 800000)) - 100000);
        ioy = io_t'($signed($urandom_range(0, 800000)) - 100000);
      end
      ts_tick = ($urandom_range(0, 9) == 0);
      #1;
      checks++;
      if (longint'(iop) != sat_sum(iox, ioy)) begin
        failures++;
        $display("FAIL sum %0d + %0d = %0d", iox, ioy, iop);
      end
      if (sat_sum(iox, ioy) != longint'(iox) + longint'(ioy)) n_sat++;
      was_tick = ts_tick;
      if (ts_tick) exp_s = sat_sum(iox, ioy);
      @(negedge clk);
      checks++;
      if (iop_s_valid !== was_tick || longint'(iop_s) != exp_s) begin
        failures++;
        $display("FAIL sample %0d valid %0b, expected %0d %0b", iop_s, iop_s_valid, exp_s, was_tick);
      end
      if (was_tick) n_samples++;
    end
    checks++;
    if (n_sat == 0 || n_samples == 0) begin failures++; $display("FAIL saturation or sampling never exercised"); end
    $display("samples=%0d saturated sums=%0d", n_samples, n_sat);
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
