// tb_ivr_workloads: runs the complete calibrate-and-tune operation on five
// systems drawn from the evaluated variation space: inductance 6 nH +-20 %,
// core threshold voltage +-20 %, at 1 V (0.15 V reference step) and 0.7 V
// (0.1 V step), with the 10 mA / 100 mA load. The Vernier window of each
// system is placed around its own nominal path delay, and at 0.7 V, where
// the path delay is far more supply-sensitive, a coarser Vernier step
// (20 ps nominal VT, 40 ps high VT) keeps the ripple inside the chain. Each system is an
// ivr_corner_run; all share the clocks and run concurrently.
module tb_ivr_workloads;
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

  ivr_corner_run #(.NAME("L+20% VT+20% 1.0V"), .L_H(7.2e-9), .VT_SCALE(1.2), .WIN0_PS(360))
    r0 (.clk_fine, .clk_s, .checks(c[0]), .failures(f[0]), .finished(fin[0]));
  ivr_corner_run #(.NAME("L-20% VT-20% 1.0V"), .L_H(4.8e-9), .VT_SCALE(0.8), .WIN0_PS(0))
    r1 (.clk_fine, .clk_s, .checks(c[1]), .failures(f[1]), .finished(fin[1]));
  ivr_corner_run #(.NAME("L nom VT nom 0.7V"), .WIN0_PS(700), .STEP_PS(20), .VT_MV(700), .VSTEP_MV(100),
                   .CAL_LO(590), .CAL_HI(606))
    r2 (.clk_fine, .clk_s, .checks(c[2]), .failures(f[2]), .finished(fin[2]));
  ivr_corner_run #(.NAME("L nom VT+20% 0.7V"), .VT_SCALE(1.2), .WIN0_PS(3000), .STEP_PS(40), .VT_MV(700),
                   .VSTEP_MV(100), .CAL_LO(590), .CAL_HI(606))
    r3 (.clk_fine, .clk_s, .checks(c[3]), .failures(f[3]), .finished(fin[3]));
  ivr_corner_run #(.NAME("L+20% VT+20% 0.7V"), .L_H(7.2e-9), .VT_SCALE(1.2), .WIN0_PS(3000), .STEP_PS(40),
                   .VT_MV(700), .VSTEP_MV(100), .CAL_LO(590), .CAL_HI(606))
    r4 (.clk_fine, .clk_s, .checks(c[4]), .failures(f[4]), .finished(fin[4]));

  int checks, failures;
  initial begin
    repeat (30000) @(posedge clk_s);
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
