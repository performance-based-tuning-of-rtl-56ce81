// error_count_cost: error-count performance cost of one coefficient
// evaluation, for cores with timing-error detection.
//
// Every enabled sample in which a timing error is flagged adds one. The error
// is either the core's own error-detecting latches (ext_err, selected by
// ext_sel) or the replica path: slack below band_lo, i.e. a path delay above
// the upper edge of the ripple band, which is where the target clock period is
// set so that steady-state ripple alone never fails. Only delays longer than
// the target are penalised, unlike the delay-sum cost.
//
// clear zeroes the counter (priority over en); it saturates at all ones; the
// count is registered, one clock after the sample.
module error_count_cost
  import ivr_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   en,
  input  slack_t slack,
  input  slack_t band_lo,
  input  logic   ext_sel,
  input  logic   ext_err,
  output cost_t  cost,
  output logic   err_event
);

  assign err_event = ext_sel ? ext_err : (slack < band_lo);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          cost <= '0;
    else if (clear)                      cost <= '0;
    else if (en && err_event && cost != '1) cost <= cost + 1'b1;
  end

endmodule
