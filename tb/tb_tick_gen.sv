// tb_tick_gen: checks the strobe divider. With DIV = 5 the strobe must come
// every 5 cycles, first 5 cycles after reset, restart 5 cycles after `sync`,
// and never in the cycle of `sync`. The expected strobe times come from a
// cycle counter kept by the testbench.
module tb_tick_gen;
  localparam int unsigned DIV = 5;
  logic clk = 1'b0, rst_n = 1'b0, sync = 1'b0, tick;
  int checks = 0, failures = 0;
  int unsigned since = 0;                  // cycles since reset or last restart
  int unsigned nticks = 0, nsync = 0;

  tick_gen #(.DIV(DIV)) dut (.clk, .rst_n, .sync, .tick);

  always #5 clk = ~clk;

  // reference: `since` counts clock edges since reset or the last restart;
  // the strobe is due when DIV-1 edges have passed
  always @(posedge clk) if (rst_n) begin
    if (sync || (since == DIV - 1)) since <= 0;
    else                            since <= since + 1;
  end

  always @(negedge clk) if (rst_n) begin
    logic exp_tick;
    #1 exp_tick = (since == DIV - 1) && !sync;
    checks++;
    if (tick !== exp_tick) begin
      failures++;
      $display("FAIL tick=%0b expected %0b (since=%0d sync=%0b)", tick, exp_tick, since, sync);
    end
    if (tick) nticks++;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (40) @(negedge clk);
    // restarts at every phase of the count, including the tick cycle
    for (int k = 0; k < 12; k++) begin
      repeat ($urandom_range(0, 7)) @(negedge clk);
      #2 sync = 1'b1; nsync++;
      @(negedge clk); #2 sync = 1'b0;
    end
    repeat (30) @(negedge clk);
    checks++;
    if (nticks < 10) begin failures++; $display("FAIL only %0d ticks", nticks); end
    $display("ticks=%0d restarts=%0d", nticks, nsync);
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
