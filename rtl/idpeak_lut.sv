// idpeak_lut: peak discharge current i_dpeak as a function of the discharge
// area ratio A_d.
//
// The amplitude of the sustain discharge current grows with the fraction of
// the panel that is lit. The relation was measured on a 42-inch HD panel and
// is stored here as seven points at A_d = 0, 1/6, 2/6, ... , 1. Between two
// points the output is linearly interpolated: A_d*6 is split into a segment
// number (integer part) and a 10-bit fraction, and
//   i_dpeak = P[seg] + (P[seg+1] - P[seg]) * frac / 1024.
// A_d at or above 1.0 gives the last point.
//
// The use of a lookup table indexed by A_d is the document's. The seven
// default values are read off its measured curve (17.5, 39, 48, 62, 77,
// 94.5 and 117 A) and are only as exact as such a reading; the uniform
// 1/6 spacing and the interpolation are this design's choices. Load other
// measurements through POINTS.
//
// Interface: A_d is unsigned Q1.10, i_dpeak unsigned Q8.4 amperes.
// Timing: one register stage, i_dpeak follows A_d one cycle later.
module idpeak_lut
  import lcp_pkg::*;
#(
  // POINTS[k] = i_dpeak at A_d = k/6, Q8.4 amperes
  parameter logic [6:0][IPK_W-1:0] POINTS = {
    12'd1872, 12'd1512, 12'd1232, 12'd992, 12'd768, 12'd624, 12'd280
  }
) (
  input  logic clk,
  input  logic rst_n,
  input  ad_t  ad,                         // discharge area ratio, Q1.10
  output ipk_t idpeak                      // peak discharge current, Q8.4 A
);
  logic [AD_W+1:0]        scaled;          // ad * 6, up to 6144
  logic [2:0]             seg;
  logic [AD_F-1:0]        frac;
  logic signed [IPK_W:0]  p_lo, p_hi, delta;
  logic signed [IPK_W+AD_F+1:0] step;     // only the low IPK_W+1 bits can be non-zero
  ipk_t                   interp;

  always_comb begin
    scaled = {2'b00, ad} * 13'd6;
    seg    = scaled[AD_F+2:AD_F];
    frac   = scaled[AD_F-1:0];
    if (ad >= AD_W'(AD_ONE)) begin
      seg  = 3'd5;
      frac = '1;
    end
    p_lo   = $signed({1'b0, POINTS[seg]});
    p_hi   = $signed({1'b0, POINTS[seg + 3'd1]});
    delta  = p_hi - p_lo;
    step   = (delta * $signed({1'b0, frac})) >>> AD_F;
    interp = IPK_W'(p_lo + step[IPK_W:0]);
    if (ad >= AD_W'(AD_ONE)) interp = POINTS[6];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) idpeak <= '0;
    else        idpeak <= interp;
  end
endmodule
