// tb_delay_sum_cost: self-checking test of the delay-sum cost. Random slack
// sequences with random bands and random enable/clear; a model adds |slack|
// only for enabled samples outside [band_lo, band_hi]. Also drives the
// accumulator into saturation.
module tb_delay_sum_cost;
  import ivr_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  slack_t slack = '0, band_lo = -slack_t'(3), band_hi = slack_t'(4);
  cost_t cost;
  always #5 clk = ~clk;

  delay_sum_cost dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint model = 0;
  int n_in = 0, n_out = 0, s;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int n = 0; n < 5000; n++) begin
      if (n % 500 == 0) begin
        band_lo = slack_t'(-int'($urandom_range(0, 8)));
        band_hi = slack_t'($urandom_range(0, 8));
      end
      clear = ($urandom_range(0, 199) == 0);
      en    = ($urandom_range(0, 3) != 0);
      s     = int'($urandom_range(0, 60)) - 30;
      slack = slack_t'(s);
      @(posedge clk);
      if (clear) model = 0;
      else if (en) begin
        if (s < band_lo || s > band_hi) begin model += (s < 0 ? -s : s); n_out++; end
        else n_in++;
      end
      #1;
      checks++;
      if (cost != cost_t'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d cost %0d exp %0d", n, cost, model);
      end
    end
    // saturation
    clear = 0; en = 1; slack = slack_t'(-127); band_lo = '0; band_hi = '0;
    force dut.cost = '1 - 24'd10;
    @(posedge clk); #1;
    release dut.cost;
    @(posedge clk); #1;
    checks++;
    if (cost != '1) begin failures++; $display("FAIL no saturation %0h", cost); end
    checks++;
    if (n_in == 0 || n_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
