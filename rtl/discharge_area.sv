// discharge_area: discharge area ratio A_d of one subfield.
//
// During the address period of a subfield the cells that will discharge in
// the following sustain period are selected. This block counts them (S_a)
// and, when addressing is over, computes A_d = S_a / (3*R), where R is the
// panel resolution in pixels and 3 the number of colour cells per pixel.
//
// Cell selections arrive LANES at a time: each cycle with `cell_valid` high
// adds the number of ones in `cell_sel` to S_a. `sf_start` clears S_a for a
// new subfield. One cycle after `addr_done` the block presents the new A_d
// and pulses `ad_valid`; A_d then holds until the next `addr_done`. The
// division is a multiplication by the constant 2^(10+RSH)/(3R) rounded up,
// so A_d is S_a/(3R) in Q1.10 to within one LSB; it saturates at 1.0.
//
// Eq. A_d = S_a/(3R) is the document's; the lane-parallel counting, the
// handshake and the reciprocal multiplication are this design's choices. The
// default R = 1024 x 768 is an assumed resolution for a 42-inch HD panel.
module discharge_area
  import lcp_pkg::*;
#(
  parameter int unsigned R     = 1024 * 768, // panel resolution in pixels
  parameter int unsigned LANES = 64          // cells presented per cycle
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sf_start,       // clear S_a (new subfield)
  input  logic             cell_valid,     // cell_sel holds LANES cells
  input  logic [LANES-1:0] cell_sel,       // 1 = cell selected for discharge
  input  logic             addr_done,      // addressing finished: compute A_d
  output ad_t              ad,             // A_d, Q1.10
  output logic             ad_valid,       // one-cycle strobe with a new A_d
  output logic [31:0]      sa              // S_a counted so far
);
  localparam int unsigned       RSH   = 32;
  localparam longint unsigned   CELLS = 3 * longint'(R);
  localparam longint unsigned   RECIP = (64'd1 << (AD_F + RSH)) / CELLS + 1;
  localparam int unsigned       RW    = $clog2(RECIP + 1);
  localparam int unsigned       PW    = $clog2(LANES + 1);

  logic [PW-1:0]  pop;
  logic [63:0]    prod;
  logic [63:0]    ratio;

  always_comb begin
    pop = '0;
    for (int i = 0; i < LANES; i++) pop += PW'(cell_sel[i]);
  end

  assign prod  = 64'(sa) * 64'(RECIP);
  assign ratio = prod >> RSH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sa       <= '0;
      ad       <= '0;
      ad_valid <= 1'b0;
    end else begin
      ad_valid <= addr_done;
      if (addr_done)
        ad <= (ratio >= 64'(AD_ONE)) ? AD_W'(AD_ONE) : AD_W'(ratio);
      if (sf_start)        sa <= '0;
      else if (cell_valid) sa <= sa + 32'(pop);
    end
  end

  // the product S_a * RECIP must fit in 64 bits
  initial assert ($clog2(CELLS + 1) + RW <= 64) else $error("discharge_area: product too wide");
endmodule
