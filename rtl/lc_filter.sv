// lc_filter: digital model of one LC input filter (X or Y side).
//
// The pulsed discharge current drawn by one side of the sustain driver
// reaches the dc-dc converter through an LC filter, 1/(1 + s^2 L C). Its
// discrete form at the sampling period T_m is
//   H(z) = b (z + 1) / (z^2 - 2 c z + 1),  c = cos(w T_m), b = 1 - c,
//   w = 1/sqrt(L C),
// which this block runs as the difference equation
//   y[n] = 2 y[n-1] - 2 b y[n-1] - y[n-2] + b (x[n-1] + x[n-2]).
// Writing 2c as 2 - 2b keeps the DC gain at exactly 1 with any quantised b.
// The transfer function is the document's; the number formats and the
// update structure are this design's.
//
// Like the analog filter it models, H(z) has no damping: its poles lie on
// the unit circle, so a step input rings around the step value for ever.
// The state therefore carries 30 fraction bits and the product is rounded
// to nearest, which keeps the drift of the ringing negligible over a field.
//
// Interface: x is the modelled discharge current i_pd (unsigned Q8.4 A).
// `en` is the T_m strobe: on each strobe x is taken as the newest sample and
// y advances one step. y (signed Q11.12 A, saturated) is registered and
// changes on the clock edge that takes the strobe, so a sample of x shows in
// y from the next strobe on, as the z^-1 in H(z) demands.
module lc_filter
  import lcp_pkg::*;
#(
  parameter int unsigned B = FILT_B_DEF    // (1 - cos(w T_m)) * 2^30, > 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,                         // T_m sampling strobe
  input  ipk_t x,                          // i_pd, Q8.4 A
  output io_t  y                           // filtered current, Q11.12 A
);
  localparam int unsigned SF = COEF_F;     // state fraction bits
  localparam int unsigned SW = 13 + SF + 1; // state width: +/-4096 A
  typedef logic signed [SW-1:0] st_t;

  localparam logic signed [SW-1:0] RND   = SW'(1) <<< (COEF_F - 1);
  localparam st_t                  Y_MAX = st_t'((longint'(1) <<< (IO_W - 1 + SF - IO_F)) - 1);
  localparam st_t                  Y_MIN = -Y_MAX - 1;

  st_t y1, y2;                             // y[n-1], y[n-2]
  ipk_t x1, x2;                            // x[n-1], x[n-2]

  logic signed [SW+COEF_F:0] damp;         // 2 b y[n-1], Q.(SF+30)
  logic [IPK_W:0]            xsum;         // x1 + x2, Q9.4
  logic signed [SW-1:0]      drive;        // b (x1 + x2), Q.SF
  st_t                       y_next;
  st_t                       y_sat;

  always_comb begin
    damp   = ((SW+COEF_F+1)'(y1) * $signed({1'b0, 2 * B})) + (SW+COEF_F+1)'(RND);
    xsum   = {1'b0, x1} + {1'b0, x2};
    drive  = (SW'($signed({1'b0, xsum})) * SW'($signed({1'b0, B}))) >>> (COEF_F + IPK_F - SF);
    y_next = (y1 <<< 1) - st_t'(damp >>> COEF_F) - y2 + drive;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1 <= '0;
      y2 <= '0;
      x1 <= '0;
      x2 <= '0;
    end else if (en) begin
      y1 <= y_next;
      y2 <= y1;
      x1 <= x;
      x2 <= x1;
    end
  end

  always_comb begin
    y_sat = y1;
    if (y1 > Y_MAX) y_sat = Y_MAX;
    if (y1 < Y_MIN) y_sat = Y_MIN;
  end
  assign y = io_t'(y_sat >>> (SF - IO_F));

  initial assert (B > 0 && B < (1 << (COEF_F - 1)))
    else $error("lc_filter: B out of range");
endmodule
