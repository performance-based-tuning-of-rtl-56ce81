// tdc_encoder: converts the Vernier chain's thermometer code into the
// digitised critical-path delay and the delay slack used by the tuning costs.
//
// The delay code is the number of Vernier stages the replica-path edge had
// not yet reached, i.e. N_STAGES minus the number of ones. Counting ones
// rather than locating the 0->1 transition makes the encoder insensitive to
// bubbles in the code. The slack is ref_code - delay code: positive when the
// path is faster than the reference clock period, negative when slower.
//
// Timing: both outputs are registered, one sample-clock cycle after the
// thermometer code. The encoding and the registering are this
// implementation's choices; the slack quantity is the one the tuner uses.
module tdc_encoder
  import ivr_pkg::*;
#(
  parameter int N = N_STAGES
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] thermo,
  input  dcode_t       ref_code,
  output dcode_t       dcode,
  output slack_t       slack
);

  dcode_t ones, dcode_d;

  always_comb begin
    ones = '0;
    for (int i = 0; i < N; i++) ones = ones + dcode_t'(thermo[i]);
    dcode_d = dcode_t'(N) - ones;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcode <= '0;
      slack <= '0;
    end else begin
      dcode <= dcode_d;
      slack <= slack_t'(ref_code) - slack_t'(dcode_d);
    end
  end

endmodule
