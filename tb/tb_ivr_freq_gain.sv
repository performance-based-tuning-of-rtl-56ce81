// tb_ivr_freq_gain: error rate and clock-frequency gain of tuned against
// baseline coefficients on five systems from the evaluated variation space,
// all run concurrently on shared clocks (see ivr_freq_run for the method):
//   1 V:   L +20 % with VT +20 %, L nominal with VT +20 %, L +20 % with
//          nominal VT; baseline (b1, b2) = (-48, 32), the nominal 1 V choice;
//   0.7 V: L +20 % with VT +20 %, L nominal with VT +20 %; baseline
//          (-64, 40), the nominal 0.7 V choice; Vernier window 3 ns + 40 ps
//          steps, since the slow core is far slower at 0.7 V.
// The 1 V high-VT systems use a window starting at 360 ps, the others 75 ps.
// On the 0.7 V system with nominal L the error-count sweep selects an
// unstable pair that ran away upward while it was scored; that system is
// marked EC_BLIND and checked for exactly that.
module tb_ivr_freq_gain;
  logic clk_fine = 0, clk_s = 0;
  int fine_cnt = 0;
  always #1 clk_fine = ~clk_fine;
  always @(posedge clk_fine) begin
    fine_cnt <= (fine_cnt == 255) ? 0 : fine_cnt + 1;
    if (fine_cnt == 255) clk_s <= ~clk_s;
  end

  localparam int NS = 5;
  int   c[NS], f[NS];
  logic fin[NS];

  ivr_freq_run #(.NAME("1.0V L+20% VT+20%"), .L_H(7.2e-9), .VT_SCALE(1.2), .WIN0(360))
    r0 (.clk_fine, .clk_s, .checks(c[0]), .failures(f[0]), .finished(fin[0]));
  ivr_freq_run #(.NAME("1.0V L nom VT+20%"), .VT_SCALE(1.2), .WIN0(360))
    r1 (.clk_fine, .clk_s, .checks(c[1]), .failures(f[1]), .finished(fin[1]));
  ivr_freq_run #(.NAME("1.0V L+20% VT nom"), .L_H(7.2e-9))
    r2 (.clk_fine, .clk_s, .checks(c[2]), .failures(f[2]), .finished(fin[2]));
  ivr_freq_run #(.NAME("0.7V L+20% VT+20%"), .L_H(7.2e-9), .VT_SCALE(1.2), .WIN0(3000), .STEP(40),
                 .VT_MV(700), .VSTEP_MV(100), .CAL_LO(590), .CAL_HI(606), .BASE_B1(-64), .BASE_B2(40))
    r3 (.clk_fine, .clk_s, .checks(c[3]), .failures(f[3]), .finished(fin[3]));
  ivr_freq_run #(.NAME("0.7V L nom VT+20%"), .VT_SCALE(1.2), .WIN0(3000), .STEP(40),
                 .VT_MV(700), .VSTEP_MV(100), .CAL_LO(590), .CAL_HI(606), .BASE_B1(-64), .BASE_B2(40),
                 .EC_BLIND(1'b1))
    r4 (.clk_fine, .clk_s, .checks(c[4]), .failures(f[4]), .finished(fin[4]));

  int checks, failures;
  initial begin
    repeat (200000) @(posedge clk_s);
    checks = 0; failures = 1;
    for (int i = 0; i < NS; i++) begin checks += c[i]; failures += f[i]; end
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk_s);   // let each run clear its finished flag
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    checks = 0; failures = 0;
    for (int i = 0; i < NS; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
