// tb_power_stage: self-checking test of the power-stage model. A 125 MHz PWM
// of fixed duty D drives it; after settling the period-averaged output must
// be D*VIN - I_LOAD*RON (the DC solution of the averaged buck), the inductor
// current must average the load current, the output must show switching
// ripple, and the 100 mA load step must cause a droop deeper than its DC
// drop before settling to the new DC value.
module tb_power_stage;
  logic clk_fine = 0, pwm = 0, load_step = 0;
  real vout, il;
  always #1 clk_fine = ~clk_fine;

  power_stage dut (.*);

  int cnt = 0;
  int duty = 700;
  always @(posedge clk_fine) begin
    cnt <= (cnt + 1) % 1024;
    pwm <= ((cnt + 1) % 1024) < duty;
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (3000000) @(posedge clk_fine);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic avg_period(output real va, output real ia, output real vmin, output real vmax);
    va = 0; ia = 0; vmin = 10; vmax = -10;
    repeat (1024) begin
      @(posedge clk_fine);
      va += vout; ia += il;
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
    end
    va /= 1024.0; ia /= 1024.0;
  endtask

  real va, ia, vmn, vmx, vexp, droop;
  initial begin
    // 4 us settle
    repeat (512 * 1024) @(posedge clk_fine);
    avg_period(va, ia, vmn, vmx);
    vexp = 700.0 / 1024.0 * 1.2 - 0.01 * 0.1;
    $display("D=700: vavg=%f expected %f iavg=%f ripple=%f", va, vexp, ia, vmx - vmn);
    chk(va > vexp - 0.003 && va < vexp + 0.003, "DC output");
    chk(ia > 0.005 && ia < 0.015, "inductor current averages the load");
    chk(vmx - vmn > 0.005 && vmx - vmn < 0.1, "switching ripple");
    load_step = 1;
    droop = 10;
    repeat (64) begin
      avg_period(va, ia, vmn, vmx);
      if (vmn < droop) droop = vmn;
    end
    avg_period(va, ia, vmn, vmx);
    vexp = 700.0 / 1024.0 * 1.2 - 0.11 * 0.1;
    $display("after step: droop min %f, vavg %f expected %f", droop, va, vexp);
    chk(droop < vexp - 0.02, "load-step droop");
    chk(va > vexp - 0.003 && va < vexp + 0.003, "DC output with step load");
    chk(ia > 0.105 && ia < 0.115, "inductor current follows the load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
