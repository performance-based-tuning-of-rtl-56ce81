// tb_dpwm: self-checking test of the DPWM. For a series of duty codes,
// including 0 and the maximum, it counts the high ticks of each 1024-tick
// switching period and checks the count equals the duty latched at the
// period start, that pwm starts high at tick 0 and that the period is 1024.
module tb_dpwm;
  import ivr_pkg::*;

  logic clk_fine = 0, rst_n = 0, pwm, period_start;
  logic [DUTY_W-1:0] duty = '0;
  always #1 clk_fine = ~clk_fine;

  dpwm dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk_fine);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int high, len;
  int duties[$] = '{0, 1, 512, 853, 1023, 7, 725};
  initial begin
    repeat (3) @(posedge clk_fine);
    rst_n = 1;
    foreach (duties[k]) begin
      // change duty mid-period: must not affect the running period
      wait (period_start); @(posedge clk_fine);
      repeat (100) @(posedge clk_fine);
      duty = duties[k];
      wait (period_start);
      #0.5;
      checks++;
      if (duties[k] > 0 && !pwm) begin failures++; $display("FAIL not high at tick 0"); end
      high = 0; len = 0;
      do begin
        if (pwm) high++;
        len++;
        @(posedge clk_fine); #0.5;
      end while (!period_start);
      checks += 2;
      if (high != duties[k]) begin failures++; $display("FAIL duty %0d: high %0d", duties[k], high); end
      if (len != 1024) begin failures++; $display("FAIL period %0d", len); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
