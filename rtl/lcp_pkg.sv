// lcp_pkg: number formats and default constants shared by the load-current
// predictor of a plasma display panel (PDP) dc-dc converter.
//
// Currents are carried as fixed-point amperes. The peak discharge current
// i_dpeak is unsigned Q8.4 (0 .. 255.94 A, the measured peak goes to about
// 117 A). The discharge area ratio A_d is unsigned Q1.10, where 1024 means
// the whole panel is lit. Filter outputs and the predicted load current are
// signed with 12 fraction bits. The filter coefficients carry 30 fraction
// bits because cos(w*T_m) lies very close to 1.
//
// The 700 ns discharge window is the document's number. The 50 MHz clock,
// the 640 ns filter sampling period T_m, the 10 us converter switching
// period T_s and the 2 kHz filter resonance are this design's choices.
package lcp_pkg;

  // Peak discharge current, unsigned Q8.4 amperes
  localparam int unsigned IPK_W = 12;
  localparam int unsigned IPK_F = 4;
  typedef logic [IPK_W-1:0] ipk_t;

  // Discharge area ratio A_d, unsigned Q1.10 (1024 = 1.0)
  localparam int unsigned AD_W   = 11;
  localparam int unsigned AD_F   = 10;
  localparam int unsigned AD_ONE = 1 << AD_F;
  typedef logic [AD_W-1:0] ad_t;

  // Filtered currents, signed, 12 fraction bits (range +/-2048 A)
  localparam int unsigned IO_W = 24;
  localparam int unsigned IO_F = 12;
  typedef logic signed [IO_W-1:0] io_t;

  // Filter coefficient fraction bits: b = 1 - cos(w*T_m) in Q0.30
  localparam int unsigned COEF_F = 30;

  // Default timing, in clock cycles of a 50 MHz clock (20 ns)
  localparam int unsigned TD_DEF     = 35;    // t_d = 700 ns
  localparam int unsigned TM_DEF     = 32;    // T_m = 640 ns  (< t_d)
  localparam int unsigned TS_DEF     = 500;   // T_s = 10 us   (100 kHz switching)

  // b = 1 - cos(2*pi*2 kHz*640 ns) = 3.2341e-5, times 2^30
  localparam int unsigned FILT_B_DEF = 34725;

  // Line memory: one TV field (16.7 ms at 60 Hz) / T_s = 1667 slots
  localparam int unsigned LINE_DEPTH_DEF = 2048;

endpackage
