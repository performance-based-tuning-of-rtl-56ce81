// ivr_freq_run: testbench helper that measures what tuning buys the
// digital core on one system (one inductance, core corner and output
// level), in the way the evaluation tables state it: the timing-error rate
// at the calibrated target clock period, and the shortest clock period that
// keeps the error rate at or below a given level, for tuned coefficients
// against a baseline pair.
//
// Sequence: band calibration; a delay-sum and an error-count sweep over
// b1 = -64..-48, b2 = 24..40 (step 8, b0 = 32); then the baseline pair
// (BASE_B1, BASE_B2), normally the pair the nominal system selects at the
// same output level, applied by a one-point sweep, which leaves the tuner in
// RUN with it. After each of the three, the loop runs closed at the target
// and the load steps between I_BASE and I_BASE + I_STEP every 88 samples
// (352 ns) for N_PER periods, the same stress for every pair. Every sample's
// TDC code is recorded. The error rate at Vernier threshold k is the
// fraction of samples whose code exceeds k, that is whose path delay
// exceeds WIN0 + (k + 1) * STEP ps. The calibrated target is the band's
// upper delay edge (ref_code - band_lo), as in the error-count cost. For a
// rate limit s, the shortest usable period is the smallest threshold whose
// rate is at most s; the frequency gain is the ratio of the baseline's
// period to the tuned pair's.
//
// Checks: calibration succeeds; each sweep evaluates nine pairs; the
// baseline pair is applied; the load toggled during every measurement; at
// the rate limits 0 and 5 % the delay-sum winner needs no longer clock
// period than the baseline. For the error-count winner the same holds, and
// its error rate at the target is no worse than the baseline's, unless
// EC_BLIND is set. EC_BLIND marks a system where that cost is known to pick
// an unstable pair. The error-count cost counts only samples slower than the
// target, so a pair whose output runs away upward during its evaluation
// scores almost nothing. There the bench checks instead that the winner's
// delay-sum cost in the same sweep was over four times the lowest, and that
// it does worse than the baseline in operation. Rates and gains are printed.
module ivr_freq_run
  import ivr_pkg::*;
#(
  parameter string NAME     = "system",
  parameter real   L_H      = 6.0e-9,
  parameter real   VT_SCALE = 1.0,
  parameter int    WIN0     = 75,
  parameter int    STEP     = 10,
  parameter int    VT_MV    = 1000,
  parameter int    VSTEP_MV = 150,
  parameter int    CAL_LO   = 846,
  parameter int    CAL_HI   = 862,
  parameter int    BASE_B1  = -48,
  parameter int    BASE_B2  = 32,
  parameter bit    EC_BLIND = 1'b0
) (
  input  logic clk_fine,
  input  logic clk_s,
  output int   checks,
  output int   failures,
  output logic finished
);

  localparam int N_PER = 6, N_MEAS = N_PER * 176;

  logic rst_n = 0, cal_start = 0, tune_start = 0, ext_load_step = 0;
  cost_mode_e cost_mode = COST_DELAY_SUM;
  coef_t b1_min = -7'sd64, b1_max = -7'sd48, b2_min = 7'sd24, b2_max = 7'sd40;
  logic cal_busy, cal_done, cal_ok, tune_busy, tune_done, loop_closed, load_step, ref_low;
  logic err_event, period_start, op_tuned;
  dcode_t ref_code, dcode;
  slack_t band_lo, band_hi, slack;
  coef_t best_b1, best_b2;
  coefs_t run_coefs;
  cost_t best_cost, cost_dsum, cost_ecnt;
  logic [15:0] n_evals;
  logic [23:0] cal_n_kept;
  duty_t duty;
  err_t err;
  real vout, il, path_delay;

  ivr_autotune_top #(.L_H(L_H), .VT_SCALE(VT_SCALE)) dut (
    .clk_fine, .clk_s, .rst_n,
    .vtarget_mv(MV_W'(VT_MV)), .vstep_mv(MV_W'(VSTEP_MV)), .trc_seg_en(4'hf), .trc_trim(4'd0), .op_idx(1'b0),
    .tdc_win0_ps(16'(WIN0)), .tdc_step_ps(8'(STEP)),
    .cal_start, .cal_d_lo(duty_t'(CAL_LO)), .cal_d_hi(duty_t'(CAL_HI)),
    .cal_busy, .cal_done, .cal_ok, .ref_code, .band_lo, .band_hi,
    .tune_start, .cost_mode, .b0(7'sd32),
    .b1_min, .b1_max, .b1_step(7'sd8), .b2_min, .b2_max, .b2_step(7'sd8),
    .d_open(duty_t'((VT_MV - VSTEP_MV) * 1024 / 1200)),
    .tune_busy, .tune_done, .best_b1, .best_b2, .best_cost, .n_evals, .op_tuned, .run_coefs,
    .razor_err(1'b0), .err_ext_sel(1'b0), .ext_load_step,
    .loop_closed, .load_step, .ref_low, .duty, .err, .dcode, .slack, .err_event,
    .cost_dsum, .cost_ecnt, .cal_n_kept, .period_start, .vout, .il, .path_delay
  );


  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s: %s", NAME, m); end
  endtask

  cost_t sweep_dsum[$], sweep_ecnt[$];

  task automatic tune(input cost_mode_e m, input int lo1, input int hi1, input int lo2, input int hi2);
    cost_mode = m;
    b1_min = coef_t'(lo1); b1_max = coef_t'(hi1);
    b2_min = coef_t'(lo2); b2_max = coef_t'(hi2);
    @(posedge clk_s); tune_start <= 1;
    @(posedge clk_s); tune_start <= 0;
    sweep_dsum.delete();
    sweep_ecnt.delete();
    while (!tune_done) begin
      @(posedge clk_s);
      if (dut.u_tune.state == 3'd4) begin   // SCORE: both cost units hold this pair's totals
        sweep_dsum.push_back(cost_dsum);
        sweep_ecnt.push_back(cost_ecnt);
      end
    end
    @(posedge clk_s); #1;
  endtask

  // Histogram of TDC codes seen in RUN under the periodic load step.
  typedef int hist_t [N_STAGES + 1];

  task automatic measure(output hist_t h, output int toggles);
    logic last;
    foreach (h[i]) h[i] = 0;
    toggles = 0;
    repeat (300) @(posedge clk_s);      // settle after RUN starts
    last = load_step;
    for (int n = 0; n < N_MEAS; n++) begin
      @(posedge clk_s);
      ext_load_step <= ((n / 88) % 2) == 1;
      #1;
      h[int'(dcode)]++;
      if (load_step != last) toggles++;
      last = load_step;
    end
    ext_load_step <= 0;
  endtask

  function automatic real rate_above(input hist_t h, input int k);
    int n = 0;
    for (int i = k + 1; i <= N_STAGES; i++) n += h[i];
    return real'(n) / real'(N_MEAS);
  endfunction

  // Shortest clock period (ps) whose error rate is at most s.
  function automatic real period_at(input hist_t h, input real s);
    for (int k = 0; k <= N_STAGES; k++)
      if (rate_above(h, k) <= s) return real'(WIN0 + (k + 1) * STEP);
    return real'(WIN0 + (N_STAGES + 1) * STEP);
  endfunction

  initial begin
    hist_t hb, hd, he;
    int tb_, td, te, k_tgt;
    int db1, db2, eb1, eb2, ec_win_dsum, ds_min;
    real rb, rd, re, pb0, pd0, pe0, pb5, pd5, pe5;
    checks = 0; failures = 0; finished = 0;
    repeat (4) @(posedge clk_s);
    rst_n = 1;
    #1;
    repeat (200) @(posedge clk_s);
    @(posedge clk_s); cal_start <= 1;
    @(posedge clk_s); cal_start <= 0;
    wait (cal_done);
    @(posedge clk_s); #1;
    chk(cal_ok, "calibration found zero-error levels");
    k_tgt = int'(ref_code) - int'(band_lo);

    tune(COST_DELAY_SUM, -64, -48, 24, 40);
    chk(n_evals == 9, "delay-sum sweep evaluated nine pairs");
    db1 = int'(best_b1); db2 = int'(best_b2);
    measure(hd, td);

    tune(COST_ERROR_COUNT, -64, -48, 24, 40);
    chk(n_evals == 9, "error-count sweep evaluated nine pairs");
    eb1 = int'(best_b1); eb2 = int'(best_b2);
    begin   // delay-sum cost of the error-count winner against the sweep's best
      int w = 0;
      cost_t dmin = sweep_dsum[0];
      foreach (sweep_ecnt[i]) if (sweep_ecnt[i] < sweep_ecnt[w]) w = i;
      foreach (sweep_dsum[i]) if (sweep_dsum[i] < dmin) dmin = sweep_dsum[i];
      ec_win_dsum = int'(sweep_dsum[w]);
      ds_min = int'(dmin);
    end
    measure(he, te);

    tune(COST_ERROR_COUNT, BASE_B1, BASE_B1, BASE_B2, BASE_B2);
    chk(n_evals == 1 && run_coefs.b1 == coef_t'(BASE_B1) && run_coefs.b2 == coef_t'(BASE_B2), "baseline pair applied");
    measure(hb, tb_);

    chk(tb_ >= 2 * N_PER - 2 && td >= 2 * N_PER - 2 && te >= 2 * N_PER - 2, "load toggled during every measurement");

    rb = rate_above(hb, k_tgt); rd = rate_above(hd, k_tgt); re = rate_above(he, k_tgt);
    pb0 = period_at(hb, 0.0);  pd0 = period_at(hd, 0.0);  pe0 = period_at(he, 0.0);
    pb5 = period_at(hb, 0.05); pd5 = period_at(hd, 0.05); pe5 = period_at(he, 0.05);
    $display("%s: target code %0d (%0d ps): error rate baseline(%0d,%0d) %.4f  delay-sum(%0d,%0d) %.4f  error-count(%0d,%0d) %.4f",
             NAME, k_tgt, WIN0 + (k_tgt + 1) * STEP, BASE_B1, BASE_B2, rb, db1, db2, rd, eb1, eb2, re);
    $display("%s: shortest period at rate 0: baseline %.0f ps, delay-sum %.0f ps (gain %.2f %%), error-count %.0f ps (gain %.2f %%)",
             NAME, pb0, pd0, (pb0 / pd0 - 1.0) * 100.0, pe0, (pb0 / pe0 - 1.0) * 100.0);
    $display("%s: shortest period at rate 5%%: baseline %.0f ps, delay-sum %.0f ps (gain %.2f %%), error-count %.0f ps (gain %.2f %%)",
             NAME, pb5, pd5, (pb5 / pd5 - 1.0) * 100.0, pe5, (pb5 / pe5 - 1.0) * 100.0);
    $display("%s: in the error-count sweep the winner's delay-sum cost was %0d, the lowest %0d",
             NAME, ec_win_dsum, ds_min);
    chk(pd0 <= pb0 && pd5 <= pb5, "delay-sum winner needs no longer period than the baseline at rates 0 and 5 %");
    if (!EC_BLIND) begin
      chk(re <= rb, "error-count winner has no higher error rate at the target than the baseline");
      chk(pe0 <= pb0 && pe5 <= pb5, "error-count winner needs no longer period than the baseline at rates 0 and 5 %");
    end else begin
      // The error-count cost only sees slow samples. An unstable pair whose
      // output runs away upward during its evaluation scores almost nothing,
      // yet in operation it may run away downward.
      chk(ec_win_dsum > 4 * ds_min && re > rb,
          "error-count winner is an unstable pair that passed by over-voltage (blind spot of that cost)");
    end
    finished = 1;
  end
endmodule
