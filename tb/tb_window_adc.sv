// tb_window_adc: self-checking test of the error-ADC model. Output voltages
// on a 1 uV grid and millivolt references are applied; the expected code is
// (V_REF - V_OUT) / 5 mV rounded to nearest (half away from zero), clipped to
// -128..127, computed in integer microvolts.
module tb_window_adc;
  import ivr_pkg::*;
  logic clk = 0, rst_n = 0;
  real vout = 0.0;
  logic [MV_W-1:0] vref_mv = '0;
  err_t err;
  always #5 clk = ~clk;

  window_adc dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int d_uv, q, vo_uv, n_sat = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int n = 0; n < 3000; n++) begin
      vref_mv = MV_W'($urandom_range(600, 1100));
      vo_uv = (n % 10 == 0) ? int'($urandom_range(0, 1200000)) : int'(vref_mv) * 1000 + int'($urandom_range(0, 400000)) - 200000;
      if ((vo_uv % 2500) == 0) vo_uv += 7;      // stay off rounding ties
      vout = real'(vo_uv) * 1.0e-6;
      d_uv = int'(vref_mv) * 1000 - vo_uv;
      q = (d_uv >= 0) ? (d_uv + 2500) / 5000 : -((-d_uv + 2500) / 5000);
      if (q > 127) begin q = 127; n_sat++; end
      if (q < -128) begin q = -128; n_sat++; end
      @(posedge clk); #1;
      checks++;
      if (int'(err) != q) begin
        failures++;
        if (failures < 10) $display("FAIL vref=%0d vout=%0duV err=%0d expected %0d", vref_mv, vo_uv, err, q);
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
