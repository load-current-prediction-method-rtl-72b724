// tick_gen: sampling-strobe generator.
//
// The predictor needs two strobes: one every T_m for the X and Y digital
// filters and one every T_s, the switching period of the dc-dc converter, for
// re-sampling the predicted current into the line memory. Both are plain
// clock dividers: a counter runs from 0 to DIV-1 and `tick` is high for the
// one cycle in which the counter holds DIV-1, so the first tick comes DIV
// cycles after reset or after `sync`. A `sync` pulse restarts the count; the
// strobe that would fall in the cycle of `sync` is suppressed. The
// T_s divider is restarted at the start of every TV field so that line-memory
// slot k always covers the same part of the field. The use of a counter and
// the sync input are this design's choices; the document only shows the two
// strobes.
module tick_gen #(
  parameter int unsigned DIV = 32          // period in clock cycles (>= 2)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sync,                       // restart the period
  output logic tick                        // one-cycle strobe every DIV cycles
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  assign tick = (cnt == CW'(DIV - 1)) && !sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            cnt <= '0;
    else if (sync || tick) cnt <= '0;
    else                   cnt <= cnt + 1'b1;
  end

  initial assert (DIV >= 2) else $error("tick_gen: DIV must be at least 2");
endmodule
