// load_current_predictor: predicts the load current of the sustain-power
// dc-dc converter of a plasma display panel from the panel's own drive
// signals, with no current sensor.
//
// In every subfield of a TV field the panel discharges once per sustain pulse
// with a peak current set by how much of the panel is lit. The converter sees
// these pulses through the LC input filters of the X and Y sustain drivers.
// The block rebuilds that current digitally:
//   discharge_area   counts the cells addressed in the subfield, A_d = S_a/3R
//   idpeak_lut       A_d -> peak discharge current i_dpeak (measured curve)
//   discharge_model  X_s / Y_s -> discharge windows i_mdx / i_mdy, and the
//                    modelled currents i_pdx = i_dpeak*i_mdx, i_pdy likewise
//   lc_filter (x2)   digital models of the X and Y input filters, at T_m
//   prediction_sampler  i_op = i_ox + i_oy, re-sampled every T_s
//   line_memory      one field of i_op, replayed in the next field as the
//                    feed-forward input of the converter controller
//   tick_gen (x2)    T_m and T_s strobes; T_s restarts with each field
// The structure is the document's; the number formats, clock rate, T_m, T_s,
// filter resonance and the handshakes are this design's choices (see each
// sub-block and the README).
//
// Interface: all inputs are synchronous to clk. Per subfield the panel
// controller pulses `sf_start`, streams the address data LANES cells per
// cycle on `cell_sel`/`cell_valid`, and pulses `addr_done` before the
// sustain period; the new i_dpeak applies two cycles after `addr_done`.
// `xs`/`ys` are the high-side sustain gate signals. `field_start` marks the
// start of a TV field. `ff_current`/`ff_valid` go to the feed-forward
// controller, which is outside this block.
module load_current_predictor
  import lcp_pkg::*;
#(
  parameter int unsigned R          = 1024 * 768,     // panel resolution
  parameter int unsigned LANES      = 64,             // address cells per cycle
  parameter int unsigned TD         = TD_DEF,         // t_d in cycles
  parameter int unsigned TM_DIV     = TM_DEF,         // T_m in cycles
  parameter int unsigned TS_DIV     = TS_DEF,         // T_s in cycles
  parameter int unsigned B_X        = FILT_B_DEF,     // X filter 1-cos(w T_m), Q0.30
  parameter int unsigned B_Y        = FILT_B_DEF,     // Y filter 1-cos(w T_m), Q0.30
  parameter int unsigned LINE_DEPTH = LINE_DEPTH_DEF, // line memory slots
  parameter logic [6:0][IPK_W-1:0] LUT_POINTS = {
    12'd1872, 12'd1512, 12'd1232, 12'd992, 12'd768, 12'd624, 12'd280
  }
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             field_start,    // TV field start
  input  logic             sf_start,       // subfield start (clear S_a)
  input  logic             cell_valid,
  input  logic [LANES-1:0] cell_sel,       // address data, 1 = cell lit
  input  logic             addr_done,      // address period over
  input  logic             xs,             // X high-side gate signal
  input  logic             ys,             // Y high-side gate signal
  output ad_t              ad,             // A_d, Q1.10
  output logic             ad_valid,       // new A_d this cycle
  output logic [31:0]      sa,             // selected cells counted (S_a)
  output ipk_t             idpeak,         // i_dpeak, Q8.4 A
  output logic             imdx,           // X discharge position
  output logic             imdy,           // Y discharge position
  output ipk_t             ipdx,           // modelled X discharge current
  output ipk_t             ipdy,           // modelled Y discharge current
  output io_t              iox,            // filtered X current, Q11.12 A
  output io_t              ioy,            // filtered Y current, Q11.12 A
  output io_t              iop,            // predicted load current, live
  output io_t              iop_s,          // predicted load current per T_s
  output logic             iop_s_valid,
  output io_t              ff_current,     // previous field, same slot
  output logic             ff_valid,
  output logic             ff_overflow,    // field longer than the memory
  output logic [$clog2(LINE_DEPTH+1)-1:0] ff_slot // next line-memory slot
);
  logic tm_tick, ts_tick;

  discharge_area #(.R(R), .LANES(LANES)) u_area (
    .clk, .rst_n, .sf_start, .cell_valid, .cell_sel, .addr_done,
    .ad, .ad_valid, .sa
  );

  idpeak_lut #(.POINTS(LUT_POINTS)) u_lut (
    .clk, .rst_n, .ad, .idpeak
  );

  discharge_model #(.TD(TD)) u_model_x (
    .clk, .rst_n, .gate(xs), .idpeak, .imd(imdx), .ipd(ipdx)
  );

  discharge_model #(.TD(TD)) u_model_y (
    .clk, .rst_n, .gate(ys), .idpeak, .imd(imdy), .ipd(ipdy)
  );

  tick_gen #(.DIV(TM_DIV)) u_tm (
    .clk, .rst_n, .sync(1'b0), .tick(tm_tick)
  );

  tick_gen #(.DIV(TS_DIV)) u_ts (
    .clk, .rst_n, .sync(field_start), .tick(ts_tick)
  );

  lc_filter #(.B(B_X)) u_filt_x (
    .clk, .rst_n, .en(tm_tick), .x(ipdx), .y(iox)
  );

  lc_filter #(.B(B_Y)) u_filt_y (
    .clk, .rst_n, .en(tm_tick), .x(ipdy), .y(ioy)
  );

  prediction_sampler u_sampler (
    .clk, .rst_n, .ts_tick, .iox, .ioy, .iop, .iop_s, .iop_s_valid
  );

  line_memory #(.DEPTH(LINE_DEPTH)) u_line (
    .clk, .rst_n, .field_start, .wr(iop_s_valid), .wdata(iop_s),
    .ff_data(ff_current), .ff_valid, .slot(ff_slot), .overflow(ff_overflow)
  );

  // T_m must be shorter than t_d so every discharge window is sampled
  initial assert (TM_DIV < TD) else $error("T_m must be shorter than t_d");
endmodule
