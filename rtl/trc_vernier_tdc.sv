// trc_vernier_tdc: behavioural model (not synthesizable logic) of the
// tunable replica circuit (TRC) of the digital core's critical path followed
// by a Vernier delay chain acting as time-to-digital converter.
//
// The TRC is built from four fixed-length segments, each worth a set number
// of inverter delays (SEG0..SEG3 = 50, 25, 15, 10 by default), chosen by
// trc_seg_en so that the replica can be matched to the critical path found
// in synthesis, plus 0..15 trim inverters appended for fine tuning. With all
// segments on and no trim it is the 100-inverter chain used as the core's
// critical path. Its delay at supply vcc follows the alpha-power law
//     t = (sum of enabled segments + trim) * T_INV_1V * f(vcc, VT) / f(1 V, VT_NOM),
//     f(v, vt) = v / (v - vt)^ALPHA
// with VT = VT_NOM * VT_SCALE, so T_INV_1V is the nominal-corner inverter
// delay at 1 V (VT_SCALE 0.8 / 1.2 give the low / high VT
// corners). On each rising edge of the sample clock the supply is sampled,
// the delay computed, and the Vernier chain reports it as a thermometer code:
// stage i reads 1 when the TRC edge has arrived win0_ps + (i+1)*step_ps
// picoseconds after launch. The window start stands for the phase of the
// capture clock and the step for the Vernier stage-delay difference; both
// are run-time settings so that one build covers every operating point. Fewer ones therefore means a slower path. The code is registered,
// one sample of latency.
//
// The 100-inverter total, the idea of selectable fixed segments plus trim
// inverters, and the VT spread follow the design description; the segment
// split, the alpha-power numbers, the window settings and the chain length
// are this model's choices, set so that the path runs near 1.4 GHz at 1 V.
// An empty selection (no segment, no trim) gives a zero delay, read as the
// fastest code.
module trc_vernier_tdc #(
  parameter int  SEG0      = 50,
  parameter int  SEG1      = 25,
  parameter int  SEG2      = 15,
  parameter int  SEG3      = 10,
  parameter int  N_STAGES  = 127,
  parameter real T_INV_1V  = 7.1e-12,
  parameter real VT_NOM    = 0.5,
  parameter real VT_SCALE  = 1.0,
  parameter real ALPHA     = 1.5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  real                 vcc,
  input  logic [3:0]          trc_seg_en, // segment i in the path when bit i is 1
  input  logic [3:0]          trc_trim,   // appended inverters
  input  logic [15:0]         win0_ps,    // Vernier window start after launch
  input  logic [7:0]          step_ps,    // Vernier step (stage delay difference)
  output logic [N_STAGES-1:0] thermo,
  output real                 delay_s
);

  localparam real VT = VT_NOM * VT_SCALE;

  function automatic real fdel(input real v, input real vt);
    return v / ((v - vt) ** ALPHA);
  endfunction

  function automatic int n_stages(input logic [3:0] seg_en, input logic [3:0] trim);
    return (seg_en[0] ? SEG0 : 0) + (seg_en[1] ? SEG1 : 0) + (seg_en[2] ? SEG2 : 0) +
           (seg_en[3] ? SEG3 : 0) + int'(trim);
  endfunction

  function automatic real t_path(input real v, input int n);
    if (v <= VT + 0.02) return 1.0e-6;   // path effectively stalled
    return real'(n) * T_INV_1V * fdel(v, VT) / fdel(1.0, VT_NOM);
  endfunction

  always_comb delay_s = t_path(vcc, n_stages(trc_seg_en, trc_trim));

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) thermo <= '0;
    else begin
      for (int i = 0; i < N_STAGES; i++)
        thermo[i] <= (delay_s <= (real'(win0_ps) + real'(i + 1) * real'(step_ps)) * 1.0e-12);
    end
  end

endmodule
