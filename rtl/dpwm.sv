// dpwm: 10-bit digital pulse-width modulator of the IVR power stage.
//
// A DUTY_W-bit counter runs on the fine clock, 2^DUTY_W ticks per switching
// period (1024 x 7.8125 ps = 8 ns, i.e. 125 MHz at the default). The duty
// command is latched when the counter wraps, so one period always uses one
// value, and pwm is high for the first duty ticks of the period (trailing-edge
// modulation). pwm high turns the PMOS on, low the NMOS.
//
// Interface: duty comes from the 250 MHz compensator domain, which is derived
// synchronously from clk_fine (512 ticks per sample), so it is stable at the
// wrap. period_start pulses for the first tick of each period.
//
// Resolution and switching frequency follow the design description; the
// counter architecture is this implementation's (a silicon DPWM of this step
// size would use a delay line for the low bits).
module dpwm
  import ivr_pkg::*;
#(
  parameter int W = DUTY_W
) (
  input  logic         clk_fine,
  input  logic         rst_n,
  input  logic [W-1:0] duty,
  output logic         pwm,
  output logic         period_start
);

  logic [W-1:0] cnt_q;
  logic [W-1:0] duty_q;

  always_ff @(posedge clk_fine or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      duty_q <= '0;
    end else begin
      cnt_q <= cnt_q + 1'b1;
      if (cnt_q == '1) duty_q <= duty;
    end
  end

  // duty for the current period: the newly latched value is used from tick 0
  assign pwm          = (cnt_q < duty_q);
  assign period_start = (cnt_q == '0);

endmodule
