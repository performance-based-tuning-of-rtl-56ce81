// tb_error_count_cost: self-checking test of the error-count cost. Random
// slack against a random lower band edge, and a random external error flag,
// with random enable/clear and source select; a model counts enabled error
// samples.
module tb_error_count_cost;
  import ivr_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, en = 0, ext_sel = 0, ext_err = 0, err_event;
  slack_t slack = '0, band_lo = -slack_t'(3);
  cost_t cost;
  always #5 clk = ~clk;

  error_count_cost dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint model = 0;
  int s, ev;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int n = 0; n < 5000; n++) begin
      if (n % 500 == 0) band_lo = slack_t'(-int'($urandom_range(0, 8)));
      ext_sel = (n / 1000) % 2;
      ext_err = $urandom_range(0, 1);
      clear   = ($urandom_range(0, 199) == 0);
      en      = ($urandom_range(0, 3) != 0);
      s       = int'($urandom_range(0, 40)) - 20;
      slack   = slack_t'(s);
      ev      = ext_sel ? ext_err : (s < int'(band_lo));
      #1;
      checks++;
      if (err_event != ev[0]) begin failures++; $display("FAIL event n=%0d", n); end
      @(posedge clk);
      if (clear) model = 0;
      else if (en && ev != 0) model++;
      #1;
      checks++;
      if (cost != cost_t'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d cost %0d exp %0d", n, cost, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
