// window_adc: behavioural model (not synthesizable logic) of the IVR's error
// ADC. On each rising edge of the 250 MHz sample clock it digitises
// V_REF - V_OUT into an ERR_W-bit two's-complement code with step LSB_V,
// rounding to the nearest code and saturating at the ends of the range.
//
// The reference is given as a millivolt code (the reference DAC is folded
// into the model). The 8-bit width and the 250 MHz rate follow the design
// description; the 5 mV LSB is this model's choice, coarser than the
// 1.17 mV duty step of the 10-bit DPWM at 1.2 V so that several DPWM levels
// read as zero error.
module window_adc
  import ivr_pkg::*;
#(
  parameter real LSB_V = 0.005
) (
  input  logic            clk,
  input  logic            rst_n,
  input  real             vout,
  input  logic [MV_W-1:0] vref_mv,
  output err_t            err
);

  localparam int EMAX = (1 << (ERR_W - 1)) - 1;
  localparam int EMIN = -(1 << (ERR_W - 1));

  function automatic err_t quantise(input real v);
    real    q;
    integer k;
    q = v / LSB_V;
    if (q > real'(EMAX))      k = EMAX;
    else if (q < real'(EMIN)) k = EMIN;
    else                      k = $rtoi(q < 0.0 ? q - 0.5 : q + 0.5);
    return err_t'(k);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) err <= '0;
    else        err <= quantise(real'(vref_mv) * 1.0e-3 - vout);
  end

endmodule
