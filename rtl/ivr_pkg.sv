// ivr_pkg: widths, types and constants shared by the IVR control path and
// the performance-based auto-tuner.
//
// The 8-bit error code, the 7-bit signed compensator coefficients and the
// 10-bit duty command follow the regulator described with the design; the
// delay-code width follows from the 127-stage Vernier chain chosen here.
package ivr_pkg;

  localparam int ERR_W    = 8;    // error ADC output, two's complement
  localparam int COEF_W   = 7;    // compensator coefficient, two's complement
  localparam int DUTY_W   = 10;   // DPWM resolution
  localparam int N_STAGES = 127;  // Vernier delay-chain stages
  localparam int DCODE_W  = $clog2(N_STAGES + 1);  // delay code, unsigned
  localparam int SLACK_W  = DCODE_W + 2;           // digitised slack, signed
  localparam int COST_W   = 24;   // cost accumulators
  localparam int MV_W     = 11;   // reference voltage in millivolts

  typedef logic signed [ERR_W-1:0]   err_t;
  typedef logic signed [COEF_W-1:0]  coef_t;
  typedef logic        [DUTY_W-1:0]  duty_t;
  typedef logic        [DCODE_W-1:0] dcode_t;
  typedef logic signed [SLACK_W-1:0] slack_t;
  typedef logic        [COST_W-1:0]  cost_t;

  // Coefficients of the direct-form compensator
  // u[n] = u[n-1] + (b0*e[n] + b1*e[n-1] + b2*e[n-2]) / 2^FRAC
  typedef struct packed {
    coef_t b0;
    coef_t b1;
    coef_t b2;
  } coefs_t;

  // Which performance metric the tuner minimises.
  typedef enum logic {
    COST_DELAY_SUM   = 1'b0,  // sum of |slack| outside the dead band
    COST_ERROR_COUNT = 1'b1   // number of timing-error events
  } cost_mode_e;

endpackage
