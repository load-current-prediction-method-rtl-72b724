// tb_discharge_model: drives random gate pulses (shorter and longer than
// t_d) and random peak currents into the discharge model with t_d = 6 cycles,
// and compares i_md and i_pd every cycle with a reference built from the
// testbench's own history of the gate: the window is open while the gate is
// high and was low TD cycles before. Also counts windows cut short by a
// short gate pulse and full-length windows.
module tb_discharge_model;
  import lcp_pkg::*;
  localparam int unsigned TD = 6;
  logic clk = 1'b0, rst_n = 1'b0, gate = 1'b0, imd;
  ipk_t idpeak = '0, ipd;
  int checks = 0, failures = 0;
  logic hist [$];                          // gate values seen at posedges
  logic exp_imd = 1'b0;
  ipk_t exp_ipd = '0;
  int run = 0, full_windows = 0, short_windows = 0, win_len = 0;

  discharge_model #(.TD(TD)) dut (.clk, .rst_n, .gate, .idpeak, .imd, .ipd);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    logic old;
    old = (hist.size() >= TD) ? hist[hist.size() - TD] : 1'b0;
    exp_imd <= gate & ~old;
    exp_ipd <= (gate & ~old) ? idpeak : '0;
    hist.push_back(gate);
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (imd !== exp_imd || ipd !== exp_ipd) begin
      failures++;
      $display("FAIL t=%0t imd=%0b/%0b ipd=%0d/%0d", $time, imd, exp_imd, ipd, exp_ipd);
    end
    if (imd) win_len++;
    else if (win_len > 0) begin
      if (win_len == TD) full_windows++; else short_windows++;
      win_len = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int p = 0; p < 300; p++) begin
      idpeak = ipk_t'($urandom_range(1, 4095));
      gate = 1'b1;
      repeat ($urandom_range(1, 3 * TD)) @(negedge clk);
      gate = 1'b0;
      repeat ($urandom_range(1, 2 * TD)) @(negedge clk);
    end
    repeat (2 * TD) @(negedge clk);
    checks++;
    if (full_windows == 0 || short_windows == 0) begin
      failures++;
      $display("FAIL window kinds not both seen: full=%0d short=%0d", full_windows, short_windows);
    end
    $display("full windows=%0d short windows=%0d", full_windows, short_windows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
