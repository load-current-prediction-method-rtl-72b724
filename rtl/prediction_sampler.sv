// prediction_sampler: sums the X and Y filter outputs into the predicted
// load current and re-samples it at the converter switching period.
//
// The load current of the dc-dc converter is the sum of the filtered X and
// Y driver currents, i_op = i_ox + i_oy. The predictor runs at the filter
// rate T_m, the converter control loop at its switching period T_s, so i_op
// is caught in a register on each T_s strobe, the value the line memory
// stores and the controller uses. The sum saturates to the output width.
//
// Interface: i_ox, i_oy and the outputs are signed Q11.12 amperes. `iop` is
// the live sum (combinational); `iop_s` is loaded on the clock edge that
// takes `ts_tick`, and `iop_s_valid` is high for the following cycle.
// The summation and the T_s register are the document's; the saturation and
// the valid strobe are this design's choices.
module prediction_sampler
  import lcp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ts_tick,                    // T_s strobe
  input  io_t  iox,                        // filtered X current
  input  io_t  ioy,                        // filtered Y current
  output io_t  iop,                        // predicted load current, live
  output io_t  iop_s,                      // predicted load current, per T_s
  output logic iop_s_valid                 // iop_s was just loaded
);
  localparam io_t MAXV = {1'b0, {(IO_W-1){1'b1}}};
  localparam io_t MINV = {1'b1, {(IO_W-1){1'b0}}};

  logic signed [IO_W:0] sum;

  always_comb begin
    sum = (IO_W+1)'(iox) + (IO_W+1)'(ioy);
    if (sum > (IO_W+1)'(MAXV))      iop = MAXV;
    else if (sum < (IO_W+1)'(MINV)) iop = MINV;
    else                            iop = io_t'(sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iop_s       <= '0;
      iop_s_valid <= 1'b0;
    end else begin
      iop_s_valid <= ts_tick;
      if (ts_tick) iop_s <= iop;
    end
  end
endmodule
