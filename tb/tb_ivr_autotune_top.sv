// tb_ivr_autotune_top: end-to-end test of the auto-tuned IVR at its default
// parameters (1 V target, 0.15 V reference step, 10 mA + 100 mA load).
//
// 1. Band calibration with the loop open over duty codes 846..862 around the
//    1 V operating point; checks that zero-error samples were found, that the
//    band contains zero slack and that the reference code is the mean delay
//    code the testbench itself collected from the zero-error samples.
// 2. Delay-sum tuning over a 3 x 3 grid of (b1, b2) and 3. error-count
//    tuning over the same grid. For each evaluation the testbench records the
//    cost at the end of the evaluation window and checks the engine picks the
//    minimum; it also checks the phase lengths (open, pre, 175-sample
//    evaluation, load step from sample 87) and that a stable pair is chosen.
//    3b. Error-count tuning again, counting an external error flag (a
//    stand-in for the core's error-detecting latches, raised when the
//    replica path misses the target edge); each evaluation's cost must equal
//    the number of flags the testbench saw in its window.
// 4. Run with the best pair: V_OUT must regulate near 1 V and recover after
//    a load step.
// 5. A second operating point, 0.7 V, is calibrated and tuned under
//    op_idx 1; switching op_idx and the target between 1 V and 0.7 V must
//    apply the pair stored for each level and regulate at both.
// 6. At 0.7 V the replica's 10-inverter segment is deselected; the mean
//    delay code must fall by about 10 % of the path delay.
// Mechanisms counted (each must occur): zero-error calibration samples,
// reference steps, load steps, slack samples ignored inside the band, slack
// samples outside it, error events, best-cost improvements, operating-point
// switches, replica segment selection, external error flags.
module tb_ivr_autotune_top;
  import ivr_pkg::*;

  logic clk_fine = 0, clk_s = 0, rst_n = 0;
  int   fine_cnt = 0;
  always #1 clk_fine = ~clk_fine;
  // clk_s: one period per 512 fine periods, rising with clk_fine
  always @(posedge clk_fine) begin
    fine_cnt <= (fine_cnt == 255) ? 0 : fine_cnt + 1;
    if (fine_cnt == 255) clk_s <= ~clk_s;
  end

  logic [MV_W-1:0] vtarget_mv = 11'd1000, vstep_mv = 11'd150;
  logic [3:0] trc_trim = 4'd0, trc_seg_en = 4'hf;
  logic op_idx = 1'b0;
  logic op_tuned;
  coefs_t run_coefs;
  logic [15:0] tdc_win0_ps = 16'd75;
  logic [7:0] tdc_step_ps = 8'd10;
  logic cal_start = 0, tune_start = 0;
  duty_t cal_d_lo = 10'd846, cal_d_hi = 10'd862, d_open = 10'd725;
  cost_mode_e cost_mode = COST_DELAY_SUM;
  coef_t b0 = 7'sd32, b1_min = -7'sd64, b1_max = -7'sd32, b1_step = 7'sd16;
  coef_t b2_min = 7'sd16, b2_max = 7'sd48, b2_step = 7'sd16;
  logic razor_err = 0, err_ext_sel = 0, ext_load_step = 0;

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

  ivr_autotune_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (40000) @(posedge clk_s);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_ref_steps = 0, n_load_steps = 0, n_in_band = 0, n_out_band = 0;
  int n_err_events = 0, n_improve = 0, n_op_switch = 0, n_seg_sel = 0;
  logic ref_low_q = 0, load_step_q = 0, cost_en_q = 0;
  always @(posedge clk_s) begin
    ref_low_q   <= ref_low;
    load_step_q <= load_step;
    if (ref_low_q && !ref_low) n_ref_steps++;
    if (load_step && !load_step_q) n_load_steps++;
    if (dut.cost_en) begin
      if (slack < band_lo || slack > band_hi) n_out_band++;
      else n_in_band++;
      if (err_event) n_err_events++;
    end
  end

  // Stand-in for the core's error-detecting latches: flags a sample whose
  // replica delay is later than the target edge, the Vernier threshold the
  // error-count cost compares against (code ref_code - band_lo).
  int rz_cnt = 0, n_rz_events = 0;
  cost_t rz_rec[$];
  always @(posedge clk_s) begin
    razor_err <= err_ext_sel &&
                 path_delay > (real'(tdc_win0_ps) + real'(int'(ref_code) - int'(band_lo) + 1) * real'(tdc_step_ps)) * 1.0e-12;
    if (dut.cost_clear) rz_cnt = 0;
    else if (dut.cost_en && razor_err) begin rz_cnt++; n_rz_events++; end
    if (dut.u_tune.state == 3'd4 && err_ext_sel) rz_rec.push_back(cost_t'(rz_cnt));
  end

  // calibration reference model: zero-error samples in the observe windows
  longint ref_sum = 0, ref_n = 0;
  int ref_min = 1000, ref_max = -1;
  always @(posedge clk_s) if (dut.u_cal.state == 3'd2 && err == 0) begin
    ref_sum += longint'(dcode); ref_n++;
    if (int'(dcode) < ref_min) ref_min = int'(dcode);
    if (int'(dcode) > ref_max) ref_max = int'(dcode);
  end

  // per-evaluation cost record and phase timing
  cost_t rec_cost[$];
  int eval_len = 0, ls_start = -1, open_len = 0;
  int bad_eval_len = 0, bad_ls = 0;
  always @(posedge clk_s) begin
    if (dut.cost_en) begin
      if (load_step && ls_start < 0) ls_start = eval_len;
      eval_len++;
    end
    if (!loop_closed && tune_busy) open_len++;
    if (dut.u_tune.state == 3'd4) begin   // SCORE
      rec_cost.push_back(cost_mode == COST_ERROR_COUNT ? cost_ecnt : cost_dsum);
      if (eval_len != 175) bad_eval_len++;
      if (ls_start != 87) bad_ls++;
      eval_len = 0;
      ls_start = -1;
      if ((cost_mode == COST_ERROR_COUNT ? cost_ecnt : cost_dsum) < best_cost) n_improve++;
    end
  end

  task automatic run_tune(input cost_mode_e m, input string tag);
    cost_t mn;
    int t0;
    cost_mode = m;
    rec_cost.delete();
    bad_eval_len = 0;
    bad_ls = 0;
    open_len = 0;
    @(posedge clk_s); tune_start <= 1;
    @(posedge clk_s); tune_start <= 0;
    t0 = 0;
    while (!tune_done) begin @(posedge clk_s); t0++; end
    check(n_evals == 9 && rec_cost.size() == 9, {tag, ": nine pairs evaluated"});
    check(t0 == 9 * (128 + 64 + 175 + 2) + 1 + 128, $sformatf("%s: sweep took %0d samples", tag, t0));
    check(bad_eval_len == 0, {tag, ": evaluation windows are 175 samples"});
    check(bad_ls == 0, {tag, ": load step starts mid-evaluation"});
    check(open_len == 9 * 129 + 128, $sformatf("%s: open-loop time %0d", tag, open_len));
    mn = rec_cost[0];
    foreach (rec_cost[i]) if (rec_cost[i] < mn) mn = rec_cost[i];
    check(best_cost == mn, $sformatf("%s: best cost %0d is the minimum %0d", tag, best_cost, mn));
    foreach (rec_cost[i]) $display("%s pair %0d cost %0d", tag, i, rec_cost[i]);
    $display("%s: best b1=%0d b2=%0d cost=%0d", tag, best_b1, best_b2, best_cost);
  endtask

  initial begin
    real vmin, vmax;
    repeat (4) @(posedge clk_s);
    rst_n = 1;
    // open loop settle from power-up while idle
    repeat (200) @(posedge clk_s);

    // 1. band calibration
    @(posedge clk_s); cal_start <= 1;
    @(posedge clk_s); cal_start <= 0;
    wait (cal_done);
    @(posedge clk_s);
    $display("cal: ok=%0d kept=%0d ref=%0d band=[%0d,%0d] tb min/max %0d/%0d",
             cal_ok, cal_n_kept, ref_code, band_lo, band_hi, ref_min, ref_max);
    check(cal_ok && cal_n_kept > 0 && cal_n_kept == 24'(ref_n), "calibration kept zero-error samples");
    check(int'(ref_code) == int'((ref_sum + ref_n / 2) / ref_n), "reference code is the mean delay code");
    check(band_lo <= 0 && band_hi >= 0, "band contains zero slack");
    check(int'(band_lo) <= int'(ref_code) - ref_max && int'(band_hi) >= int'(ref_code) - ref_min, "band covers observed slack");

    // 2. delay-sum tuning
    run_tune(COST_DELAY_SUM, "delay-sum");
    // 3. error-count tuning
    run_tune(COST_ERROR_COUNT, "error-count");
    // 3b. error-count tuning fed by the core's error flag
    err_ext_sel = 1;
    rz_rec.delete();
    run_tune(COST_ERROR_COUNT, "razor error-count");
    err_ext_sel = 0;
    begin
      int mism = 0;
      if (rz_rec.size() != rec_cost.size()) mism++;
      else foreach (rz_rec[i]) if (rz_rec[i] != rec_cost[i]) mism++;
      check(mism == 0, "error-count cost counts the external error flag");
    end

    // 4. run with the best pair
    repeat (400) @(posedge clk_s);
    vmin = 10.0; vmax = 0.0;
    repeat (100) begin
      @(posedge clk_s);
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
    end
    $display("run: vout %f .. %f", vmin, vmax);
    check(loop_closed && vmin > 0.97 && vmax < 1.03, "regulates 1 V with the tuned pair");
    ext_load_step <= 1;
    repeat (30) @(posedge clk_s);
    check(vout < 1.0 || dut.il > 0.05, "load step draws current");
    repeat (400) @(posedge clk_s);
    check(vout > 0.97 && vout < 1.03, $sformatf("recovers after load step (%f)", vout));
    ext_load_step <= 0;

    // 5. second operating point (DVFS level 0.7 V): calibrate and tune it
    //    under op_idx 1, then move between the two levels
    begin
      coef_t b1_1v, b2_1v;
      b1_1v = best_b1; b2_1v = best_b2;
      check(op_tuned && run_coefs.b1 == b1_1v && run_coefs.b2 == b2_1v, "op 0 pair stored and used");
      op_idx = 1'b1;
      vtarget_mv = 11'd700; vstep_mv = 11'd100; d_open = 10'd512;
      tdc_win0_ps = 16'd700; tdc_step_ps = 8'd20;
      cal_d_lo = 10'd590; cal_d_hi = 10'd606;
      @(posedge clk_s);
      check(!op_tuned, "op 1 not yet tuned");
      @(posedge clk_s); cal_start <= 1;
      @(posedge clk_s); cal_start <= 0;
      wait (cal_done);
      @(posedge clk_s);
      check(cal_ok, "0.7 V calibration");
      b1_min = -7'sd64; b1_max = -7'sd48; b1_step = 7'sd8;
      b2_min = 7'sd24;  b2_max = 7'sd40;  b2_step = 7'sd8;
      run_tune(COST_DELAY_SUM, "0.7V delay-sum");
      @(posedge clk_s); #1;
      check(op_tuned && run_coefs.b1 == best_b1 && run_coefs.b2 == best_b2, "op 1 pair stored and used");
      // DVFS: back to 1 V with the op 0 pair, then down to 0.7 V again
      for (int k = 0; k < 2; k++) begin
        op_idx = (k == 0) ? 1'b0 : 1'b1;
        vtarget_mv = (k == 0) ? 11'd1000 : 11'd700;
        @(posedge clk_s); #1;
        check(run_coefs.b1 == ((k == 0) ? b1_1v : best_b1) && run_coefs.b2 == ((k == 0) ? b2_1v : best_b2),
              $sformatf("operating-point switch selects the stored pair (%0d,%0d)", run_coefs.b1, run_coefs.b2));
        n_op_switch++;
        repeat (500) @(posedge clk_s);
        check(vout > 0.97 * real'(vtarget_mv) / 1000.0 && vout < 1.03 * real'(vtarget_mv) / 1000.0,
              $sformatf("regulates after switching to %0d mV (%f)", vtarget_mv, vout));
      end
      // 6. replica segment selection at 0.7 V: dropping the 10-inverter
      //    segment shortens the path by 10 %, about 10 Vernier codes here
      begin
        real c_full, c_short;
        c_full = 0.0; c_short = 0.0;
        repeat (64) begin @(posedge clk_s); #1; c_full += real'(dcode); end
        trc_seg_en = 4'b0111;
        repeat (4) @(posedge clk_s);
        repeat (64) begin @(posedge clk_s); #1; c_short += real'(dcode); end
        c_full /= 64.0; c_short /= 64.0;
        check(c_full - c_short > 6.0 && c_full - c_short < 14.0,
              $sformatf("shorter replica selection lowers the delay code (%f -> %f)", c_full, c_short));
        n_seg_sel++;
        trc_seg_en = 4'hf;
      end
    end

    $display("mechanisms: ref_steps=%0d load_steps=%0d in_band=%0d out_band=%0d err_events=%0d improve=%0d",
             n_ref_steps, n_load_steps, n_in_band, n_out_band, n_err_events, n_improve);
    check(n_ref_steps >= 27, "reference steps happened");
    check(n_load_steps >= 28, "load steps happened");
    check(n_in_band > 0, "in-band slack samples happened");
    check(n_out_band > 0, "out-of-band slack samples happened");
    check(n_err_events > 0, "timing-error events happened");
    check(n_improve >= 2, "best-cost improvements happened");
    check(n_op_switch == 2, "operating-point switches happened");
    check(n_rz_events > 0, "external error flags happened");
    check(n_seg_sel == 1, "replica segment selection changed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
