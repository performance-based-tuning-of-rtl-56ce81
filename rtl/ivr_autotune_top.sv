// ivr_autotune_top: fully integrated inductive voltage regulator driving a
// digital core, with performance-based auto-tuning of its compensator.
//
// Regulator loop (250 MHz sample clock clk_s, 125 MHz switching):
//   power_stage (model) -> window_adc (model, e = V_REF - V_OUT, 8 bit)
//   -> dig_compensator (direct-form type III, 7-bit coefficients)
//   -> dpwm (10 bit, on clk_fine = 1024 x 125 MHz) -> power_stage.
// Performance monitor: trc_vernier_tdc (model of the replica critical path,
// built from segments chosen by trc_seg_en plus trc_trim inverters, and the
// Vernier chain, supplied by V_OUT) -> tdc_encoder (delay code, slack).
// Tuner: slack_band_cal sets the reference code and ripple band with the loop
// open; tuning_engine then sweeps (b1, b2), scoring each pair with
// delay_sum_cost or error_count_cost (cost_mode), and finally runs the loop
// with the best pair, which coef_bank keeps per operating point.
//
// Clocks: clk_s must be derived from clk_fine, rising together, one clk_s
// period per 512 clk_fine periods. All control state is on clk_s. The
// reference is V_TARGET (vtarget_mv), lowered by vstep_mv while the tuner
// asks for the low reference. While calibration runs it owns the open-loop
// duty; otherwise the tuning engine does. The core's own timing-error
// signal (razor_err) may replace the replica-path errors (err_ext_sel).
// ext_load_step adds the load step outside the tuner's evaluations.
// Operating points: each finished tuning run stores its best pair in
// coef_bank under op_idx; in RUN the compensator uses the pair stored for the
// current op_idx, so switching op_idx together with vtarget_mv (a DVFS
// transition) also switches the coefficients. run_coefs shows the pair in use.
// The analog parameters default to the regulator described with the design:
// 1.2 V in, 6 nH, 10 nF, 50 mOhm ESR, 10 mA base and 100 mA step load.
module ivr_autotune_top
  import ivr_pkg::*;
#(
  parameter real L_H       = 6.0e-9,
  parameter real C_F       = 10.0e-9,
  parameter real ESR_OHM   = 0.05,
  parameter real VIN_V     = 1.2,
  parameter real VT_SCALE  = 1.0,
  parameter int  N_OPEN    = 128,
  parameter int  N_PRE     = 64,
  parameter int  N_EVAL    = 175,
  parameter int  N_SETTLE  = 128,
  parameter int  N_OBS     = 32,
  parameter int  N_OP      = 2,
  localparam int OPW       = (N_OP > 1) ? $clog2(N_OP) : 1
) (
  input  logic            clk_fine,
  input  logic            clk_s,
  input  logic            rst_n,
  // operating point
  input  logic [MV_W-1:0] vtarget_mv,
  input  logic [MV_W-1:0] vstep_mv,
  input  logic [3:0]      trc_seg_en,
  input  logic [3:0]      trc_trim,
  input  logic [OPW-1:0]  op_idx,
  input  logic [15:0]     tdc_win0_ps,
  input  logic [7:0]      tdc_step_ps,
  // band calibration
  input  logic            cal_start,
  input  duty_t           cal_d_lo,
  input  duty_t           cal_d_hi,
  output logic            cal_busy,
  output logic            cal_done,
  output logic            cal_ok,
  output dcode_t          ref_code,
  output slack_t          band_lo,
  output slack_t          band_hi,
  // tuning
  input  logic            tune_start,
  input  cost_mode_e      cost_mode,
  input  coef_t           b0,
  input  coef_t           b1_min,
  input  coef_t           b1_max,
  input  coef_t           b1_step,
  input  coef_t           b2_min,
  input  coef_t           b2_max,
  input  coef_t           b2_step,
  input  duty_t           d_open,
  output logic            tune_busy,
  output logic            tune_done,
  output coef_t           best_b1,
  output coef_t           best_b2,
  output cost_t           best_cost,
  output logic [15:0]     n_evals,
  output logic            op_tuned,
  output coefs_t          run_coefs,
  // core interface
  input  logic            razor_err,
  input  logic            err_ext_sel,
  input  logic            ext_load_step,
  // observation
  output logic            loop_closed,
  output logic            load_step,
  output logic            ref_low,
  output duty_t           duty,
  output err_t            err,
  output dcode_t          dcode,
  output slack_t          slack,
  output logic            err_event,
  output cost_t           cost_dsum,
  output cost_t           cost_ecnt,
  output logic [23:0]     cal_n_kept,
  output logic            period_start,
  output real             vout,
  output real             il,
  output real             path_delay
);

  logic            pwm;
  logic [MV_W-1:0] vref_mv;
  logic [N_STAGES-1:0] thermo;
  duty_t           cal_d, tune_d, d_fixed;
  logic            tune_closed, cost_clear, cost_en;
  coefs_t          coefs;
  coef_t           bank_b1, bank_b2;
  logic            tune_run;

  logic tune_load_step;

  // coefficients in use: in RUN, the pair stored for the current operating
  // point if it has one, otherwise the tuner's own output
  assign tune_run  = tune_closed && !tune_busy;
  always_comb begin
    run_coefs = coefs;
    if (tune_run && op_tuned) begin
      run_coefs.b1 = bank_b1;
      run_coefs.b2 = bank_b2;
    end
  end

  assign vref_mv     = ref_low ? (vtarget_mv - vstep_mv) : vtarget_mv;
  assign d_fixed     = cal_busy ? cal_d : tune_d;
  assign loop_closed = tune_closed && !cal_busy;
  assign load_step   = (tune_busy && tune_load_step) || ext_load_step;

  power_stage #(
    .VIN_V(VIN_V), .L_H(L_H), .C_F(C_F), .ESR_OHM(ESR_OHM)
  ) u_power (
    .clk_fine(clk_fine), .pwm(pwm), .load_step(load_step), .vout(vout), .il(il)
  );

  window_adc u_adc (
    .clk(clk_s), .rst_n(rst_n), .vout(vout), .vref_mv(vref_mv), .err(err)
  );

  dig_compensator u_comp (
    .clk(clk_s), .rst_n(rst_n), .loop_closed(loop_closed), .d_fixed(d_fixed),
    .coefs(run_coefs), .err(err), .duty(duty)
  );

  dpwm u_dpwm (
    .clk_fine(clk_fine), .rst_n(rst_n), .duty(duty), .pwm(pwm), .period_start(period_start)
  );

  trc_vernier_tdc #(
    .VT_SCALE(VT_SCALE), .N_STAGES(N_STAGES)
  ) u_trc (
    .clk(clk_s), .rst_n(rst_n), .vcc(vout), .trc_seg_en(trc_seg_en), .trc_trim(trc_trim), .win0_ps(tdc_win0_ps),
    .step_ps(tdc_step_ps), .thermo(thermo),
    .delay_s(path_delay)
  );

  tdc_encoder u_enc (
    .clk(clk_s), .rst_n(rst_n), .thermo(thermo), .ref_code(ref_code),
    .dcode(dcode), .slack(slack)
  );

  slack_band_cal #(
    .N_SETTLE(N_SETTLE), .N_OBS(N_OBS)
  ) u_cal (
    .clk(clk_s), .rst_n(rst_n), .start(cal_start), .d_lo(cal_d_lo), .d_hi(cal_d_hi),
    .err(err), .dcode(dcode), .busy(cal_busy), .done(cal_done), .ok(cal_ok),
    .d_fixed(cal_d), .ref_code(ref_code), .band_lo(band_lo), .band_hi(band_hi),
    .n_kept(cal_n_kept)
  );

  delay_sum_cost u_dsum (
    .clk(clk_s), .rst_n(rst_n), .clear(cost_clear), .en(cost_en), .slack(slack),
    .band_lo(band_lo), .band_hi(band_hi), .cost(cost_dsum)
  );

  error_count_cost u_ecnt (
    .clk(clk_s), .rst_n(rst_n), .clear(cost_clear), .en(cost_en), .slack(slack),
    .band_lo(band_lo), .ext_sel(err_ext_sel), .ext_err(razor_err), .cost(cost_ecnt),
    .err_event(err_event)
  );

  tuning_engine #(
    .N_OPEN(N_OPEN), .N_PRE(N_PRE), .N_EVAL(N_EVAL)
  ) u_tune (
    .clk(clk_s), .rst_n(rst_n), .start(tune_start), .mode(cost_mode), .b0(b0),
    .b1_min(b1_min), .b1_max(b1_max), .b1_step(b1_step),
    .b2_min(b2_min), .b2_max(b2_max), .b2_step(b2_step), .d_open(d_open),
    .cost_dsum(cost_dsum), .cost_ecnt(cost_ecnt),
    .loop_closed(tune_closed), .d_fixed(tune_d), .ref_low(ref_low),
    .load_step(tune_load_step), .cost_clear(cost_clear), .cost_en(cost_en),
    .coefs(coefs), .busy(tune_busy), .done(tune_done), .best_b1(best_b1),
    .best_b2(best_b2), .best_cost(best_cost), .n_evals(n_evals)
  );

  coef_bank #(.N_OP(N_OP)) u_bank (
    .clk(clk_s), .rst_n(rst_n), .wr_en(tune_done), .wr_idx(op_idx),
    .wr_b1(best_b1), .wr_b2(best_b2), .rd_idx(op_idx), .rd_b1(bank_b1),
    .rd_b2(bank_b2), .rd_valid(op_tuned)
  );

endmodule
