// tuning_engine: performance-based auto-tuning sequencer of the IVR
// compensator.
//
// It sweeps the coefficient pair (b1, b2) over a run-time range (b1_min ..
// b1_max, b2_min .. b2_max, step sizes b1_step/b2_step, b2 innermost) with b0
// fixed, and evaluates every pair with the same sequence so that all see the
// same events:
//   OPEN  N_OPEN samples (plus the NEXT cycle before it): loop open, DPWM at the fixed duty d_open, which
//         returns the output to the same initial condition every time;
//   PRE   N_PRE samples: loop closed with the trial pair at the low reference
//         V_TARGET - V_STEP (ref_low high); the cost units are cleared;
//   EVAL  N_EVAL samples (175 = 700 ns at 250 MHz): reference raised to
//         V_TARGET (the reference step), cost units enabled; the load step
//         I_STEP is applied from the middle of the period to its end;
//   SCORE the selected cost (delay-sum or error-count) is compared with the
//         best so far; a strictly lower cost replaces it.
// After the last pair the loop is opened once more for N_OPEN samples (FINAL),
// so the winner starts from the same initial condition it was scored from,
// then the engine enters RUN: loop closed at V_TARGET with the best pair, and
// done pulses. Before the first start it holds the loop open
// at d_open.
//
// Interface: one sample clock; start is a one-cycle pulse; cost_dsum and
// cost_ecnt are the registered outputs of the cost units, valid in SCORE.
// d_fixed is d_open and coefs.b0 is b0, passed straight through, so that the
// compensator takes all of its settings from one place.
// The sequence and the 700 ns evaluation follow the design description;
// N_OPEN, N_PRE, the tie rule and the run-time sweep range are choices here.
module tuning_engine
  import ivr_pkg::*;
#(
  parameter int N_OPEN = 128,
  parameter int N_PRE  = 64,
  parameter int N_EVAL = 175
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  cost_mode_e mode,
  input  coef_t      b0,
  input  coef_t      b1_min,
  input  coef_t      b1_max,
  input  coef_t      b1_step,
  input  coef_t      b2_min,
  input  coef_t      b2_max,
  input  coef_t      b2_step,
  input  duty_t      d_open,
  input  cost_t      cost_dsum,
  input  cost_t      cost_ecnt,
  output logic       loop_closed,
  output duty_t      d_fixed,
  output logic       ref_low,
  output logic       load_step,
  output logic       cost_clear,
  output logic       cost_en,
  output coefs_t     coefs,
  output logic       busy,
  output logic       done,
  output coef_t      best_b1,
  output coef_t      best_b2,
  output cost_t      best_cost,
  output logic [15:0] n_evals
);

  typedef enum logic [2:0] {T_IDLE, T_OPEN, T_PRE, T_EVAL, T_SCORE, T_NEXT, T_FINAL, T_RUN} state_e;
  state_e state;

  localparam int CNT_W = 16;
  logic [CNT_W-1:0] cnt;
  coef_t b1, b2;
  cost_t cost_sel;

  logic signed [COEF_W+1:0] b1_nx, b2_nx;
  always_comb begin
    b1_nx    = (COEF_W+2)'(b1) + (COEF_W+2)'((b1_step > 0) ? b1_step : coef_t'(1));
    b2_nx    = (COEF_W+2)'(b2) + (COEF_W+2)'((b2_step > 0) ? b2_step : coef_t'(1));
    cost_sel = (mode == COST_ERROR_COUNT) ? cost_ecnt : cost_dsum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= T_IDLE;
      cnt       <= '0;
      b1        <= '0;
      b2        <= '0;
      best_b1   <= '0;
      best_b2   <= '0;
      best_cost <= '1;
      n_evals   <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        T_IDLE, T_RUN: if (start) begin
          state     <= T_OPEN;
          cnt       <= '0;
          b1        <= b1_min;
          b2        <= b2_min;
          best_b1   <= b1_min;
          best_b2   <= b2_min;
          best_cost <= '1;
          n_evals   <= '0;
        end
        T_OPEN: begin
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(N_OPEN - 1)) begin cnt <= '0; state <= T_PRE; end
        end
        T_PRE: begin
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(N_PRE - 1)) begin cnt <= '0; state <= T_EVAL; end
        end
        T_EVAL: begin
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(N_EVAL - 1)) begin cnt <= '0; state <= T_SCORE; end
        end
        T_SCORE: begin
          n_evals <= n_evals + 1'b1;
          if (cost_sel < best_cost) begin
            best_cost <= cost_sel;
            best_b1   <= b1;
            best_b2   <= b2;
          end
          state <= T_NEXT;
        end
        T_NEXT: begin
          state <= T_OPEN;
          if (b2_nx > (COEF_W+2)'(b2_max)) begin
            b2 <= b2_min;
            if (b1_nx > (COEF_W+2)'(b1_max)) state <= T_FINAL;
            else b1 <= coef_t'(b1_nx);
          end else b2 <= coef_t'(b2_nx);
        end
        T_FINAL: begin
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(N_OPEN - 1)) begin
            cnt   <= '0;
            state <= T_RUN;
            done  <= 1'b1;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  always_comb begin
    loop_closed = (state == T_PRE) || (state == T_EVAL) || (state == T_SCORE) || (state == T_RUN);
    d_fixed     = d_open;
    ref_low     = (state == T_PRE);
    load_step   = (state == T_EVAL) && (cnt >= CNT_W'(N_EVAL / 2));
    cost_clear  = (state == T_PRE);
    cost_en     = (state == T_EVAL);
    busy        = (state != T_IDLE) && (state != T_RUN);
    coefs.b0    = b0;
    coefs.b1    = (state == T_RUN || state == T_FINAL) ? best_b1 : b1;
    coefs.b2    = (state == T_RUN || state == T_FINAL) ? best_b2 : b2;
  end

endmodule
