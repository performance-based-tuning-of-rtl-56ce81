// tb_dig_compensator: self-checking test of the direct-form compensator.
// Random error codes and coefficient sets are applied; an integer model of
// u[n] = clamp(u[n-1] + b0 e[n] + b1 e[n-1] + b2 e[n-2]) with 4 fraction bits
// predicts the duty one clock later. Also checks the open-loop override and
// preload, and that both clamps are reached.
module tb_dig_compensator;
  import ivr_pkg::*;

  logic clk = 0, rst_n = 0, loop_closed = 0;
  duty_t d_fixed = 10'd500, duty;
  coefs_t coefs;
  err_t err = '0;
  always #5 clk = ~clk;

  dig_compensator dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint u, e1, e2;
  int n_hi = 0, n_lo = 0;
  localparam longint UMAX = 1023 * 16;

  initial begin
    coefs = '{b0: 7'sd32, b1: -7'sd48, b2: 7'sd32};
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    @(posedge clk);
    #1;
    checks++; if (duty != 10'd500) begin failures++; $display("FAIL open loop duty %0d", duty); end
    u = 500 * 16; e1 = 0; e2 = 0;
    for (int n = 0; n < 6000; n++) begin
      if (n % 1000 == 0) begin
        coefs.b0 = coef_t'($urandom_range(0, 63));
        coefs.b1 = coef_t'(-int'($urandom_range(0, 64)));
        coefs.b2 = coef_t'($urandom_range(0, 63));
      end
      loop_closed = 1;
      // bias the error so both clamps get visited
      err = err_t'((n / 500) % 2 ? int'($urandom_range(0, 60)) - 20 : int'($urandom_range(0, 60)) - 40);
      @(posedge clk);
      u = u + coefs.b0 * longint'(err) + coefs.b1 * e1 + coefs.b2 * e2;
      if (u < 0) u = 0;
      if (u > UMAX) u = UMAX;
      e2 = e1; e1 = err;
      #1;
      checks++;
      if (duty != duty_t'(u / 16)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d duty=%0d expected %0d", n, duty, u / 16);
      end
      if (u == UMAX) n_hi++;
      if (u == 0) n_lo++;
    end
    // reopen the loop: duty follows d_fixed after one clock, history cleared
    loop_closed = 0; d_fixed = 10'd300;
    @(posedge clk); #1;
    checks++; if (duty != 10'd300) begin failures++; $display("FAIL reopen"); end
    loop_closed = 1; err = '0;
    @(posedge clk); #1;
    checks++; if (duty != 10'd300) begin failures++; $display("FAIL bumpless close %0d", duty); end
    checks++; if (n_hi == 0 || n_lo == 0) begin failures++; $display("FAIL clamps not reached %0d %0d", n_hi, n_lo); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
