// discharge_model: digital model of the discharge current of one side (X or Y)
// of the full-bridge sustain driver.
//
// The panel discharges just after the high-side gate signal (X_s or Y_s)
// turns on, for at most t_d. The block keeps a t_d-long delayed copy of the
// gate signal in a shift register and combines it with the live signal so
// that the position signal i_md is high for the first TD cycles of every
// high-side on-pulse. The modelled discharge current i_pd is i_md times the
// peak current i_dpeak of the present subfield, i.e. i_dpeak while i_md is
// high and zero otherwise.
//
// The document builds i_md from the gate signal, a t_d delay and an AND gate,
// with t_d = 700 ns. Here the delayed copy enters the AND inverted, which
// gives the t_d-wide window after each rising edge that the filter sampling
// period T_m < t_d is meant to catch; see the README.
//
// Timing: both outputs are registered. i_md/i_pd at cycle n+1 reflect the
// gate at cycle n and at cycle n-TD. Pulses of the gate shorter than TD give
// a window as long as the pulse.
module discharge_model
  import lcp_pkg::*;
#(
  parameter int unsigned TD = TD_DEF       // t_d in clock cycles
) (
  input  logic clk,
  input  logic rst_n,
  input  logic gate,                       // high-side gate signal X_s or Y_s
  input  ipk_t idpeak,                     // peak discharge current, Q8.4 A
  output logic imd,                        // discharge position
  output ipk_t ipd                         // modelled discharge current, Q8.4 A
);
  logic [TD-1:0] dly;                      // dly[k] = gate k+1 cycles ago
  logic          win;

  // first TD cycles after a rising edge of the gate
  assign win = gate & ~dly[TD-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly <= '0;
      imd <= 1'b0;
      ipd <= '0;
    end else begin
      dly <= {dly[TD-2:0], gate};
      imd <= win;
      ipd <= win ? idpeak : '0;
    end
  end

  initial assert (TD >= 2) else $error("discharge_model: TD must be at least 2");
endmodule
