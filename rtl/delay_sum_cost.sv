// delay_sum_cost: delay-sum performance cost of one coefficient evaluation.
//
// Every enabled sample whose digitised slack lies outside the dead band
// [band_lo, band_hi] adds |slack| to the cost; samples inside the band, which
// reflect supply ripple that no coefficient can remove, add nothing. Slack
// that is too large (path faster than needed) is penalised as well as slack
// that is too small, so the minimum cost picks the coefficients that keep the
// logic delay closest to the target period over the whole evaluation.
//
// clear zeroes the accumulator (it has priority over en). The accumulator
// saturates at all ones. cost is registered: it includes a sample one clock
// after that sample is presented with en high.
module delay_sum_cost
  import ivr_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   en,
  input  slack_t slack,
  input  slack_t band_lo,
  input  slack_t band_hi,
  output cost_t  cost
);

  slack_t mag;
  logic   outside;
  logic [COST_W:0] sum;

  always_comb begin
    mag     = (slack < 0) ? -slack : slack;
    outside = (slack < band_lo) || (slack > band_hi);
    sum     = {1'b0, cost} + (COST_W+1)'(unsigned'(mag));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             cost <= '0;
    else if (clear)         cost <= '0;
    else if (en && outside) cost <= sum[COST_W] ? '1 : sum[COST_W-1:0];
  end

endmodule
