// tb_discharge_area: a small panel (R = 100 pixels, 300 cells) addressed 8
// cells per cycle. Each subfield lights a random number of cells, including
// none and all, and the testbench counts them itself. After `addr_done` it
// expects S_a exactly and A_d = S_a*1024/300 to within one LSB, with a strobe
// one cycle later; A_d must hold until the next `addr_done`.
module tb_discharge_area;
  import lcp_pkg::*;
  localparam int unsigned R = 100, LANES = 8, CELLS = 3 * R;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sf_start = 1'b0, cell_valid = 1'b0, addr_done = 1'b0, ad_valid;
  logic [LANES-1:0] cell_sel = '0;
  ad_t  ad;
  logic [31:0] sa;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  discharge_area #(.R(R), .LANES(LANES)) dut (
    .clk, .rst_n, .sf_start, .cell_valid, .cell_sel, .addr_done, .ad, .ad_valid, .sa
  );

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int sf = 0; sf < 40; sf++) begin
      int unsigned lit, pct;
      real want;
      ad_t held;
      lit = 0;
      pct = (sf == 0) ? 0 : (sf == 1) ? 100 : $urandom_range(0, 100);
      sf_start = 1'b1;
      @(negedge clk) sf_start = 1'b0;
      for (int c = 0; c < CELLS; c += LANES) begin
        for (int l = 0; l < LANES; l++) begin
          cell_sel[l] = (c + l < CELLS) && ($urandom_range(0, 99) < pct);
          lit += cell_sel[l];
        end
        cell_valid = 1'b1;
        @(negedge clk);
        cell_valid = 1'b0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);   // gaps in the stream
      end
      cell_sel = '0;
      held = ad;
      addr_done = 1'b1;
      @(negedge clk) addr_done = 1'b0;
      check(ad_valid === 1'b1, "ad_valid strobe missing");
      check(sa == lit, $sformatf("S_a=%0d expected %0d", sa, lit));
      want = real'(lit) * 1024.0 / real'(CELLS);
      check(real'(ad) >= $floor(want) && real'(ad) <= $floor(want) + 1.0,
            $sformatf("A_d=%0d expected %f (S_a=%0d)", ad, want, lit));
      if (lit == CELLS) begin n_full++; check(ad == 11'd1024, "full panel must give 1.0"); end
      if (lit == 0)     begin n_empty++; check(ad == 11'd0, "dark panel must give 0"); end
      held = ad;
      repeat (3) @(negedge clk);
      check(ad_valid === 1'b0 && ad == held, "A_d must hold between subfields");
    end
    check(n_full > 0 && n_empty > 0, "full and dark subfields both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
