// tb_slack_band_cal: self-checking test of the open-loop band calibration.
// The testbench plays the regulator and replica path: the error code is zero
// only for duty codes 103..106 and the delay code is a function of the duty
// plus random noise. Knowing the settle/observe schedule (overridden to 8/5
// samples), it collects the zero-error delay codes itself and checks the
// duty sweep, the rounded mean reference, the band edges (x1.25, floor and
// ceiling) and the run time. A second run with no zero-error level must end
// with ok low.
module tb_slack_band_cal;
  import ivr_pkg::*;

  localparam int S = 8, O = 5;
  logic clk = 0, rst_n = 0, start = 0, busy, done, ok;
  duty_t d_lo = 10'd100, d_hi = 10'd110, d_fixed;
  err_t err = '0;
  dcode_t dcode = '0, ref_code;
  slack_t band_lo, band_hi;
  logic [23:0] n_kept;
  always #5 clk = ~clk;

  slack_band_cal #(.N_SETTLE(S), .N_OBS(O)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic int floor_div16(input int x);
    return (x >= 0) ? x / 16 : -((-x + 15) / 16);
  endfunction

  int sum, n, mn, mx, lvl, pos, k, cyc, e_ref, e_lo, e_hi, ndc;
  int zlo, zhi;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int run = 0; run < 2; run++) begin
      zlo = (run == 0) ? 103 : 2000;
      zhi = (run == 0) ? 106 : 2000;
      sum = 0; n = 0; mn = 1000; mx = -1;
      start = 1;
      @(posedge clk); #1;
      start = 0;
      k = 0;
      while (busy) begin
        lvl = k / (S + O);
        pos = k % (S + O);
        if (d_fixed != duty_t'(100 + lvl)) begin failures++; $display("FAIL duty %0d at level %0d", d_fixed, lvl); end
        err   = (int'(d_fixed) >= zlo && int'(d_fixed) <= zhi) ? err_t'(0) :
                (int'(d_fixed) < zlo ? err_t'(3) : -err_t'(3));
        ndc   = 60 - 2 * (int'(d_fixed) - 100) + int'($urandom_range(0, 4));
        dcode = dcode_t'(ndc);
        @(posedge clk); #1;
        if (pos >= S && err == 0) begin
          sum += ndc; n++;
          if (ndc < mn) mn = ndc;
          if (ndc > mx) mx = ndc;
        end
        k++;
      end
      chk(k == 11 * (S + O), $sformatf("sweep length %0d", k));
      cyc = 0;
      while (!done && cyc < 100) begin @(posedge clk); #1; cyc++; end
      chk(done, "done pulse");
      if (run == 0) begin
        e_ref = (sum + n / 2) / n;
        e_lo  = floor_div16((e_ref - mx) * 20);
        e_hi  = -floor_div16(-(e_ref - mn) * 20);
        $display("n=%0d ref=%0d band=[%0d,%0d] expected ref=%0d band=[%0d,%0d]", n_kept, ref_code, band_lo, band_hi, e_ref, e_lo, e_hi);
        chk(ok && int'(n_kept) == n, "zero-error sample count");
        chk(int'(ref_code) == e_ref, "reference is rounded mean");
        chk(int'(band_lo) == e_lo && int'(band_hi) == e_hi, "band edges");
      end else begin
        chk(!ok && n_kept == 0, "no zero-error level gives ok low");
        chk(int'(ref_code) == e_ref, "outputs held after failed run");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
