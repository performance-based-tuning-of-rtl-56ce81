// slack_band_cal: open-loop calibration of the slack reference and of the
// ripple dead band used by the tuning costs.
//
// With the control loop open the DPWM is driven by a fixed duty D_P,FIXED,
// stepped from d_lo to d_hi. Because the DPWM is finer than the ADC, several
// of these levels produce a zero digitised error; those are the duty values
// the regulator can sit at in closed-loop steady state. At each level the
// block waits N_SETTLE samples, then for N_OBS samples keeps every delay code
// taken while the error code is zero: their minimum, maximum and sum. When the
// sweep ends:
//   ref_code = mean of the kept delay codes (rounded), the reference period;
//   slack range [ref - max, ref - min], widened by FACTOR_Q4/16 (floor for the
//   lower edge, ceiling for the upper) to give band_lo and band_hi.
// The mean is formed by a bit-serial restoring divider, SUM_W cycles.
//
// Interface: start (one cycle) begins a run; busy is high while the block
// owns the DPWM (d_fixed valid, loop must be open); done pulses once at the
// end with ok low if no sample had zero error (outputs then unchanged).
// The procedure follows the design description; the settle and observe
// lengths, the 1.25 factor and per-sample qualification are choices here.
module slack_band_cal
  import ivr_pkg::*;
#(
  parameter int N_SETTLE  = 128,
  parameter int N_OBS     = 32,
  parameter int FACTOR_Q4 = 20,
  parameter int SUM_W     = 24
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  duty_t  d_lo,
  input  duty_t  d_hi,
  input  err_t   err,
  input  dcode_t dcode,
  output logic   busy,
  output logic   done,
  output logic   ok,
  output duty_t  d_fixed,
  output dcode_t ref_code,
  output slack_t band_lo,
  output slack_t band_hi,
  output logic [SUM_W-1:0] n_kept
);

  typedef enum logic [2:0] {S_IDLE, S_SETTLE, S_OBS, S_DIV, S_BAND} state_e;
  state_e state;

  localparam int CNT_W = $clog2((N_SETTLE > N_OBS ? N_SETTLE : N_OBS) + 1);

  logic [CNT_W-1:0]          cnt;
  logic [SUM_W-1:0]          sum, quo, rem;
  logic [$clog2(SUM_W+1)-1:0] bitn;
  dcode_t                    dmin, dmax;

  // bit-serial restoring division of sum by n_kept
  logic [SUM_W:0] rem_sh, rem_sub;
  always_comb begin
    rem_sh  = {rem, sum[SUM_W-1]};
    rem_sub = rem_sh - {1'b0, n_kept};
  end

  // band edges from the reference and the extreme delay codes
  localparam int WB = SLACK_W + 8;
  logic signed [WB-1:0] smin_f, smax_f;
  always_comb begin
    smin_f = (WB'(signed'({1'b0, quo[DCODE_W-1:0]})) - WB'(signed'({1'b0, dmax}))) * WB'(FACTOR_Q4);
    smax_f = (WB'(signed'({1'b0, quo[DCODE_W-1:0]})) - WB'(signed'({1'b0, dmin}))) * WB'(FACTOR_Q4);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      sum      <= '0;
      quo      <= '0;
      rem      <= '0;
      bitn     <= '0;
      dmin     <= '1;
      dmax     <= '0;
      n_kept   <= '0;
      d_fixed  <= '0;
      done     <= 1'b0;
      ok       <= 1'b0;
      ref_code <= dcode_t'(N_STAGES / 2);
      band_lo  <= '0;
      band_hi  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_SETTLE;
          cnt     <= '0;
          sum     <= '0;
          n_kept  <= '0;
          dmin    <= '1;
          dmax    <= '0;
          d_fixed <= d_lo;
        end
        S_SETTLE: begin
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(N_SETTLE - 1)) begin
            cnt   <= '0;
            state <= S_OBS;
          end
        end
        S_OBS: begin
          if (err == '0) begin
            sum    <= sum + SUM_W'(dcode);
            n_kept <= n_kept + 1'b1;
            if (dcode < dmin) dmin <= dcode;
            if (dcode > dmax) dmax <= dcode;
          end
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(N_OBS - 1)) begin
            cnt <= '0;
            if (d_fixed >= d_hi) begin
              state <= S_DIV;
              bitn  <= '0;
              rem   <= '0;
              quo   <= '0;
            end else begin
              d_fixed <= d_fixed + 1'b1;
              state   <= S_SETTLE;
            end
          end
        end
        S_DIV: begin
          if (n_kept == '0) begin
            ok    <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            if (bitn == '0) sum <= sum + (n_kept >> 1);  // round to nearest
            else begin
              if (!rem_sub[SUM_W]) begin
                rem <= rem_sub[SUM_W-1:0];
                quo <= {quo[SUM_W-2:0], 1'b1};
              end else begin
                rem <= rem_sh[SUM_W-1:0];
                quo <= {quo[SUM_W-2:0], 1'b0};
              end
              sum <= sum << 1;
            end
            bitn <= bitn + 1'b1;
            if (bitn == ($clog2(SUM_W+1))'(SUM_W)) state <= S_BAND;
          end
        end
        S_BAND: begin
          ref_code <= quo[DCODE_W-1:0];
          band_lo  <= slack_t'(smin_f >>> 4);
          band_hi  <= slack_t'(-((-smax_f) >>> 4));
          ok       <= 1'b1;
          done     <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_SETTLE) || (state == S_OBS);

endmodule
