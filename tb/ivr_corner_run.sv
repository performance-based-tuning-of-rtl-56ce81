// ivr_corner_run: testbench helper that takes one auto-tuned IVR, built for
// one process / passive corner and operating point, through a complete
// tuning run: band calibration, delay-sum tuning and error-count tuning over
// a 3 x 3 (b1, b2) grid (b0 = 32, b1 = -64..-48, b2 = 24..40, step 8), then closed-loop operation with the error-count
// result. It checks calibration success, that each sweep evaluated nine pairs
// and kept the lowest cost it saw, and that the final loop regulates within
// 3 % of the target. Results are reported on its ports for the caller.
module ivr_corner_run
  import ivr_pkg::*;
#(
  parameter string NAME     = "corner",
  parameter real   L_H      = 6.0e-9,
  parameter real   VT_SCALE = 1.0,
  parameter int    WIN0_PS  = 75,
  parameter int    STEP_PS  = 10,
  parameter int    VT_MV    = 1000,
  parameter int    VSTEP_MV = 150,
  parameter int    CAL_LO   = 846,
  parameter int    CAL_HI   = 862
) (
  input  logic clk_fine,
  input  logic clk_s,
  output int   checks,
  output int   failures,
  output logic finished
);

  logic rst_n = 0, cal_start = 0, tune_start = 0;
  cost_mode_e cost_mode = COST_DELAY_SUM;
  logic cal_busy, cal_done, cal_ok, tune_busy, tune_done, loop_closed, load_step, ref_low;
  logic err_event, period_start;
  dcode_t ref_code, dcode;
  slack_t band_lo, band_hi, slack;
  coef_t best_b1, best_b2;
  cost_t best_cost, cost_dsum, cost_ecnt;
  logic [15:0] n_evals;
  logic [23:0] cal_n_kept;
  duty_t duty;
  err_t err;
  real vout, il, path_delay;

  ivr_autotune_top #(.L_H(L_H), .VT_SCALE(VT_SCALE)) dut (
    .clk_fine, .clk_s, .rst_n,
    .vtarget_mv(MV_W'(VT_MV)), .vstep_mv(MV_W'(VSTEP_MV)), .trc_seg_en(4'hf), .trc_trim(4'd0),
    .tdc_win0_ps(16'(WIN0_PS)), .tdc_step_ps(8'(STEP_PS)),
    .cal_start, .cal_d_lo(duty_t'(CAL_LO)), .cal_d_hi(duty_t'(CAL_HI)),
    .cal_busy, .cal_done, .cal_ok, .ref_code, .band_lo, .band_hi,
    .tune_start, .cost_mode, .b0(7'sd32),
    .b1_min(-7'sd64), .b1_max(-7'sd48), .b1_step(7'sd8),
    .b2_min(7'sd24), .b2_max(7'sd40), .b2_step(7'sd8),
    .d_open(duty_t'((VT_MV - VSTEP_MV) * 1024 / 1200)),
    .tune_busy, .tune_done, .best_b1, .best_b2, .best_cost, .n_evals,
    .op_idx(1'b0), .op_tuned(), .run_coefs(),
    .razor_err(1'b0), .err_ext_sel(1'b0), .ext_load_step(1'b0),
    .loop_closed, .load_step, .ref_low, .duty, .err, .dcode, .slack, .err_event,
    .cost_dsum, .cost_ecnt, .cal_n_kept, .period_start, .vout, .il, .path_delay
  );

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s: %s", NAME, m); end
  endtask

  cost_t rec[$];
  always @(posedge clk_s)
    if (dut.u_tune.state == 3'd4)
      rec.push_back(cost_mode == COST_ERROR_COUNT ? cost_ecnt : cost_dsum);

  task automatic tune(input cost_mode_e m, output int b1, output int b2);
    cost_t mn;
    cost_mode = m;
    rec.delete();
    @(posedge clk_s); tune_start <= 1;
    @(posedge clk_s); tune_start <= 0;
    while (!tune_done) @(posedge clk_s);
    mn = rec[0];
    foreach (rec[i]) if (rec[i] < mn) mn = rec[i];
    chk(n_evals == 9 && rec.size() == 9, "nine pairs evaluated");
    chk(best_cost == mn, "lowest cost kept");
    b1 = int'(best_b1);
    b2 = int'(best_b2);
  endtask

  initial begin
    int d1, d2, e1, e2;
    real vmin, vmax, vt;
    checks = 0; failures = 0; finished = 0;
    repeat (4) @(posedge clk_s);
    rst_n = 1;
    repeat (200) @(posedge clk_s);
    @(posedge clk_s); cal_start <= 1;
    @(posedge clk_s); cal_start <= 0;
    wait (cal_done);
    @(posedge clk_s);
    chk(cal_ok, "calibration found zero-error levels");
    tune(COST_DELAY_SUM, d1, d2);
    tune(COST_ERROR_COUNT, e1, e2);
    repeat (400) @(posedge clk_s);
    vmin = 10; vmax = 0; vt = real'(VT_MV) / 1000.0;
    repeat (100) begin
      @(posedge clk_s);
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
    end
    chk(vmin > 0.97 * vt && vmax < 1.03 * vt, "tuned loop regulates");
    $display("%s: band [%0d,%0d] ref %0d | delay-sum (%0d,%0d) | error-count (%0d,%0d) | vout %.4f..%.4f",
             NAME, band_lo, band_hi, ref_code, d1, d2, e1, e2, vmin, vmax);
    finished = 1;
  end

endmodule
