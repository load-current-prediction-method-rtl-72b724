// tb_load_current_predictor: end-to-end run of the predictor at its default
// size (1024 x 768 panel, 64 address cells per cycle, 50 MHz clock,
// t_d = 35, T_m = 32, T_s = 500 cycles, 2048-slot line memory).
//
// Four TV fields of 833 333 cycles (60 Hz) are driven. Each field has ten
// subfields; a subfield streams the address data of all 3*R cells (the first
// n of every 64 lit, so A_d = n/64 exactly), then runs its sustain pulses:
// X_s high for 100 cycles, Y_s high for 100 cycles, a 250-cycle (5 us)
// period, 4 to 128 pulses per subfield. Fields 1 and 3 use one image, fields
// 2 and 4 another (in the manner of the green and blue test images). The
// last field is stretched past the line-memory capacity.
//
// The testbench carries its own model of the whole prediction: the gate
// history for the discharge windows, the T_m and T_s counters, the peak
// current from a real-valued interpolation of the measured curve, and both
// filters in double precision. It checks A_d at each subfield, i_dpeak,
// every re-sampled prediction (within 10 mA), and in every field after the
// first that the line memory returns the previous field's samples slot by
// slot. It counts the mechanisms of the design and fails if one never
// occurred: X and Y discharge windows, windows caught by one and by two T_m
// samples, a full-panel and a dark subfield, line-memory replay, the field
// restart of T_s and a line-memory overflow.
module tb_load_current_predictor;
  import lcp_pkg::*;

  localparam int unsigned R = 1024 * 768, LANES = 64, TD = TD_DEF;
  localparam int unsigned TM = TM_DEF, TS = TS_DEF, DEPTH = LINE_DEPTH_DEF;
  localparam int unsigned BEATS = 3 * R / LANES;
  localparam int unsigned FIELD = 833_333;
  localparam int unsigned NSF = 10, PERIOD = 250;
  localparam int unsigned NFIELD = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic field_start = 1'b0, sf_start = 1'b0, cell_valid = 1'b0, addr_done = 1'b0;
  logic [LANES-1:0] cell_sel = '0;
  logic xs = 1'b0, ys = 1'b0;
  ad_t  ad;
  logic ad_valid;
  logic [31:0] sa;
  ipk_t idpeak, ipdx, ipdy;
  logic imdx, imdy;
  io_t  iox, ioy, iop, iop_s, ff_current;
  logic iop_s_valid, ff_valid, ff_overflow;
  logic [$clog2(DEPTH+1)-1:0] ff_slot;

  load_current_predictor dut (
    .clk, .rst_n, .field_start, .sf_start, .cell_valid, .cell_sel, .addr_done,
    .xs, .ys, .ad, .ad_valid, .sa, .idpeak, .imdx, .imdy, .ipdx, .ipdy,
    .iox, .ioy, .iop, .iop_s, .iop_s_valid, .ff_current, .ff_valid,
    .ff_overflow, .ff_slot
  );

  always #10 clk = ~clk;                  // 50 MHz

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  // ---------------- stimulus tables ----------------
  int unsigned lit  [2][NSF] = '{'{64, 3, 10, 20, 30, 40, 50, 60, 0, 16},
                                 '{ 0, 8, 24, 12, 50, 64, 33, 45, 5, 28}};
  int unsigned puls [NSF]    = '{4, 8, 12, 16, 24, 32, 48, 64, 96, 128};
  real curve [7] = '{17.5, 39.0, 48.0, 62.0, 77.0, 94.5, 117.0};

  // i_dpeak for A_d = n/64, floored to 1/16 A like the table's output
  function automatic real peak_amps(int unsigned n);
    real x, f, v;
    int  k;
    x = real'(n) / 64.0 * 6.0;
    if (x >= 6.0) return curve[6];
    k = int'($floor(x));
    f = x - real'(k);
    v = curve[k] + (curve[k+1] - curve[k]) * f;
    return $floor(v * 16.0) / 16.0;
  endfunction

  // ---------------- reference model ----------------
  real    ref_ipk = 0.0;                   // present subfield's i_dpeak
  logic   xhist [$], yhist [$];
  real    r_ipdx = 0.0, r_ipdy = 0.0;      // registered modelled currents
  real    fx1 = 0, fx2 = 0, fy1 = 0, fy2 = 0;   // filter outputs y[n-1], y[n-2]
  real    xx1 = 0, xx2 = 0, xy1 = 0, xy2 = 0;   // filter inputs x[n-1], x[n-2]
  int unsigned mcnt = 0, scnt = 0;
  real    ref_q [$];                       // predictions due at the T_s register
  int     hits_x = 0, win_x = 0, once = 0, twice = 0, restarts = 0;
  logic   in_win_x = 1'b0;

  always @(posedge clk) if (rst_n) begin
    logic wx, wy, tm, tsk;
    real  bx, by, nx, ny;
    wx  = xs & ~((xhist.size() >= TD) ? xhist[xhist.size() - TD] : 1'b0);
    wy  = ys & ~((yhist.size() >= TD) ? yhist[yhist.size() - TD] : 1'b0);
    tm  = (mcnt == TM - 1);
    tsk = (scnt == TS - 1) && !field_start;
    if (tsk) ref_q.push_back(fx1 + fy1);
    if (field_start && scnt != 0) restarts++;
    if (tm) begin
      bx = real'(FILT_B_DEF) / 1073741824.0;
      by = bx;
      nx = 2.0 * fx1 - 2.0 * bx * fx1 - fx2 + bx * (xx1 + xx2);
      ny = 2.0 * fy1 - 2.0 * by * fy1 - fy2 + by * (xy1 + xy2);
      fx2 = fx1; fx1 = nx; fy2 = fy1; fy1 = ny;
      xx2 = xx1; xx1 = r_ipdx; xy2 = xy1; xy1 = r_ipdy;
      if (r_ipdx != 0.0) hits_x++;
    end
    // discharge-window bookkeeping on the registered X window
    if (r_ipdx != 0.0) in_win_x = 1'b1;
    else if (in_win_x) begin
      in_win_x = 1'b0;
      win_x++;
      if (hits_x == 1) once++;
      if (hits_x == 2) twice++;
      hits_x = 0;
    end
    r_ipdx = wx ? ref_ipk : 0.0;
    r_ipdy = wy ? ref_ipk : 0.0;
    mcnt = tm ? 0 : mcnt + 1;
    scnt = (field_start || tsk) ? 0 : scnt + 1;
    xhist.push_back(xs);
    yhist.push_back(ys);
    if (xhist.size() > TD + 2) begin void'(xhist.pop_front()); void'(yhist.pop_front()); end
  end

  // ---------------- output checks ----------------
  io_t    rec [2][DEPTH];                  // samples of the previous/this field
  int     n_cur = 0, n_prev = 0, field_no = 0;
  int     n_samples = 0, n_replay = 0, n_overflow = 0, n_imdy = 0, n_full = 0, n_dark = 0;
  int     pend = -1;                       // slot whose replay is due this cycle
  logic   imdy_q = 1'b0;

  always @(negedge clk) if (rst_n) begin
    if (imdy && !imdy_q) n_imdy++;
    imdy_q = imdy;
    // replay of the sample written one cycle earlier
    if (pend >= 0) begin
      check(ff_valid === (pend < n_prev), $sformatf("ff_valid slot %0d field %0d", pend, field_no));
      if (pend < n_prev && ff_valid) begin
        n_replay++;
        check(ff_current === rec[(field_no + 1) % 2][pend],
              $sformatf("replay slot %0d: %0d expected %0d", pend, ff_current,
                        rec[(field_no + 1) % 2][pend]));
      end
      pend = -1;
    end
    if (ff_overflow) n_overflow++;
    if (iop_s_valid) begin
      real want, got;
      n_samples++;
      check(ref_q.size() > 0, "sample without reference");
      if (ref_q.size() > 0) begin
        want = ref_q.pop_front();
        got  = real'(iop_s) / 4096.0;
        check(got - want < 0.01 && want - got < 0.01,
              $sformatf("i_op sample %0d of field %0d: %f A, expected %f A", n_cur, field_no, got, want));
      end
      if (n_cur < DEPTH) begin
        rec[field_no % 2][n_cur] = iop_s;
        pend = n_cur;
        n_cur++;
      end
    end
  end

  // ---------------- stimulus ----------------
  task automatic subfield(input int img, input int s);
    int unsigned n;
    n = lit[img][s];
    sf_start = 1'b1;
    @(negedge clk) sf_start = 1'b0;
    for (int unsigned l = 0; l < LANES; l++) cell_sel[l] = (l < n);
    cell_valid = 1'b1;
    repeat (BEATS) @(negedge clk);
    cell_valid = 1'b0;
    cell_sel = '0;
    addr_done = 1'b1;
    ref_ipk = peak_amps(n);
    @(negedge clk) addr_done = 1'b0;
    check(ad_valid === 1'b1 && ad == ad_t'(n * 16) && sa == n * BEATS,
          $sformatf("A_d=%0d S_a=%0d expected %0d / %0d", ad, sa, n * 16, n * BEATS));
    if (ad == 11'd1024) n_full++;
    if (ad == 11'd0) n_dark++;
    @(negedge clk);
    check(real'(idpeak) / 16.0 == ref_ipk,
          $sformatf("i_dpeak %f expected %f", real'(idpeak) / 16.0, ref_ipk));
    repeat (4) @(negedge clk);
    for (int p = 0; p < puls[s]; p++) begin
      xs = 1'b1; repeat (100) @(negedge clk);
      xs = 1'b0; repeat (25)  @(negedge clk);
      ys = 1'b1; repeat (100) @(negedge clk);
      ys = 1'b0; repeat (25)  @(negedge clk);
    end
  endtask

  initial begin
    longint t0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (123) @(negedge clk);           // fields do not start on a T_s edge
    for (int f = 0; f < NFIELD; f++) begin
      int unsigned len;
      len = (f == NFIELD - 1) ? (DEPTH + 20) * TS : FIELD;
      field_no = f;
      n_prev = n_cur;
      n_cur = 0;
      t0 = longint'($time);
      #1 field_start = 1'b1;
      @(negedge clk) field_start = 1'b0;
      for (int s = 0; s < NSF; s++) subfield(f % 2, s);
      while (longint'($time) - t0 < longint'(len) * 20) @(negedge clk);
      $display("field %0d: %0d samples", f, n_cur);
    end
    repeat (5) @(negedge clk);
    check(win_x == NFIELD * 432 && n_imdy == NFIELD * 432,
          $sformatf("discharge windows X=%0d Y=%0d expected %0d", win_x, n_imdy, NFIELD * 432));
    check(once > 0,       "no window caught by a single T_m sample");
    check(twice > 0,      "no window caught by two T_m samples");
    check(n_full > 0,     "no full-panel subfield");
    check(n_dark > 0,     "no dark subfield");
    check(n_replay > 0,   "line memory never replayed");
    check(restarts > 0,   "T_s never restarted by a field");
    check(n_overflow > 0, "line memory never overflowed");
    $display("windows X=%0d Y=%0d (1 sample: %0d, 2 samples: %0d) samples=%0d replayed=%0d",
             win_x, n_imdy, once, twice, n_samples, n_replay);
    $display("full=%0d dark=%0d restarts=%0d overflow=%0d", n_full, n_dark, restarts, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_500_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
