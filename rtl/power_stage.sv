// power_stage: behavioural model (not synthesizable logic) of the IVR power
// stage and its load: a PMOS/NMOS half bridge from VIN, the series inductor,
// the output capacitor with its ESR, and the digital core drawn as a current
// source of I_BASE, plus I_STEP while load_step is high.
//
// The switch node is VIN while pwm is high and ground while it is low; both
// switches have on-resistance RON. Once per rising edge of clk_fine the
// inductor current is advanced by an Euler step of DT_S, and the capacitor
// voltage is then advanced with that new current (semi-implicit Euler, which
// keeps the LC tank from gaining energy). DT_S must equal the fine-clock
// period (7.8125 ps at the default 125 MHz x 1024). Both states update with
// nonblocking assignments, so a block sampling vout on the same edge sees
// the value from before the edge. vout includes the ESR drop.
//
// VIN, L, C, ESR, I_BASE and I_STEP default to the regulator described with
// the design; RON and the zero initial state are this model's assumptions.
module power_stage #(
  parameter real VIN_V    = 1.2,
  parameter real L_H      = 6.0e-9,
  parameter real C_F      = 10.0e-9,
  parameter real ESR_OHM  = 0.05,
  parameter real RON_OHM  = 0.1,
  parameter real I_BASE_A = 0.01,
  parameter real I_STEP_A = 0.1,
  parameter real DT_S     = 7.8125e-12
) (
  input  logic clk_fine,
  input  logic pwm,
  input  logic load_step,
  output real  vout,
  output real  il
);

  real vc, il_r;

  initial begin
    vc   = 0.0;
    il_r = 0.0;
  end

  function automatic real load_current(input logic step);
    return step ? (I_BASE_A + I_STEP_A) : I_BASE_A;
  endfunction

  always @(posedge clk_fine) begin
    real vsw, iload, vo, il_n;
    vsw   = pwm ? VIN_V : 0.0;
    iload = load_current(load_step);
    vo    = vc + ESR_OHM * (il_r - iload);
    il_n  = il_r + (vsw - RON_OHM * il_r - vo) / L_H * DT_S;
    il_r <= il_n;
    vc   <= vc + (il_n - iload) / C_F * DT_S;
  end

  assign vout = vc + ESR_OHM * (il_r - load_current(load_step));
  assign il   = il_r;

endmodule
