// dig_compensator: direct-form type-III (PID) digital compensator of the IVR.
//
// Each 250 MHz sample it takes the digitised error e[n] = code(V_REF - V_OUT)
// and updates the duty command
//     u[n] = u[n-1] + (b0*e[n] + b1*e[n-1] + b2*e[n-2]) / 2^FRAC
// i.e. an integrator with two zeros, which is what a type-III compensator for
// the LC double pole needs. u keeps FRAC fraction bits and is clamped to the
// DPWM range 0 .. 2^DUTY_W-1. The tuned quantities are the coefficients,
// 7-bit signed integers; the tuner sweeps the pair (b1, b2) with b0 fixed.
//
// While loop_closed is low the regulator runs open loop: the output is the
// fixed duty d_fixed, the error history is cleared and the integrator is
// preloaded with d_fixed, so closing the loop starts without a duty jump.
//
// Timing: one register stage; duty reflects e[n] one sample clock later.
// The 8/7/10-bit widths follow the design description; the difference
// equation, FRAC and the preload are choices of this implementation.
module dig_compensator
  import ivr_pkg::*;
#(
  parameter int FRAC = 4
) (
  input  logic   clk,          // 250 MHz sample clock
  input  logic   rst_n,        // asynchronous, active low
  input  logic   loop_closed,
  input  duty_t  d_fixed,      // open-loop duty
  input  coefs_t coefs,
  input  err_t   err,          // e[n]
  output duty_t  duty
);

  localparam int ACC_W = DUTY_W + FRAC + 2 + ERR_W + COEF_W;
  localparam logic signed [ACC_W-1:0] U_MAX = ACC_W'(((1 << DUTY_W) - 1) << FRAC);

  logic signed [ACC_W-1:0] u_q, u_d, sum;
  err_t e1_q, e2_q;

  always_comb begin
    sum = ACC_W'(coefs.b0) * ACC_W'(err)
        + ACC_W'(coefs.b1) * ACC_W'(e1_q)
        + ACC_W'(coefs.b2) * ACC_W'(e2_q);
    u_d = u_q + sum;
    if (u_d < 0)          u_d = '0;
    else if (u_d > U_MAX) u_d = U_MAX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_q  <= '0;
      e1_q <= '0;
      e2_q <= '0;
    end else if (!loop_closed) begin
      u_q  <= ACC_W'(d_fixed) <<< FRAC;
      e1_q <= '0;
      e2_q <= '0;
    end else begin
      u_q  <= u_d;
      e1_q <= err;
      e2_q <= e1_q;
    end
  end

  assign duty = duty_t'(u_q >>> FRAC);

endmodule
