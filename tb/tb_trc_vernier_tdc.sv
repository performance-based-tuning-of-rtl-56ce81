// tb_trc_vernier_tdc: self-checking test of the replica-path / Vernier model.
// Two instances, nominal VT and +20 % VT, see the same supply. For random
// supplies the testbench predicts the path delay from the alpha-power law,
// written as (enabled segment lengths + trim) * 7.1 ps * (1 - 0.5)^1.5 * V / (V - VT)^1.5,
// and the number of Vernier stages reached, N - (ceil((t - win0)/step) - 1)
// clipped to 0..N, for a 1 V window (75 ps, 10 ps) and a 0.7 V window
// (700 ps, 20 ps). It also checks 1 V nominal gives about 0.71 ns, that the
// high-VT path is slower and that trim lengthens the path. In the random
// part the segment selection is random too (segments of 50, 25, 15 and 10
// inverters).
module tb_trc_vernier_tdc;
  localparam int N = 127;
  logic clk = 0, rst_n = 0;
  real vcc = 1.0, d_nom, d_hi;
  logic [3:0] trc_trim = '0, trc_seg_en = 4'hf;
  logic [15:0] win0_ps = 16'd75;
  logic [7:0] step_ps = 8'd10;
  logic [N-1:0] th_nom, th_hi;
  always #5 clk = ~clk;

  trc_vernier_tdc u_nom (.clk, .rst_n, .vcc, .trc_seg_en, .trc_trim, .win0_ps, .step_ps, .thermo(th_nom), .delay_s(d_nom));
  trc_vernier_tdc #(.VT_SCALE(1.2)) u_hi (.clk, .rst_n, .vcc, .trc_seg_en, .trc_trim, .win0_ps, .step_ps, .thermo(th_hi), .delay_s(d_hi));

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic int seg_len(input logic [3:0] en);
    return (en[0] ? 50 : 0) + (en[1] ? 25 : 0) + (en[2] ? 15 : 0) + (en[3] ? 10 : 0);
  endfunction
  function automatic real model_delay(input real v, input real vt, input int trim);
    return real'(seg_len(trc_seg_en) + trim) * 7.1e-12 * ((1.0 - 0.5) ** 1.5) * v / ((v - vt) ** 1.5);
  endfunction
  function automatic int model_ones(input real t);
    int miss;
    miss = $rtoi($ceil((t - real'(win0_ps) * 1.0e-12) / (real'(step_ps) * 1.0e-12))) - 1;
    if (miss < 0) miss = 0;
    if (miss > N) miss = N;
    return N - miss;
  endfunction
  function automatic int ones(input logic [N-1:0] x);
    int c = 0;
    for (int i = 0; i < N; i++) c += x[i];
    return c;
  endfunction

  real t1, t2;
  int o1, o2, prev_ones;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    vcc = 1.0;
    @(posedge clk); #1;
    $display("1V nominal delay %e, high VT %e", d_nom, d_hi);
    chk(d_nom > 0.70e-9 && d_nom < 0.72e-9, "1 V nominal path delay");
    chk(d_hi > d_nom, "high VT is slower");
    for (int n = 0; n < 1000; n++) begin
      vcc = 0.8 + real'($urandom_range(0, 40000)) * 1.0e-5;
      trc_trim = 4'($urandom_range(0, 15));
      trc_seg_en = (n % 4 == 0) ? 4'hf : 4'($urandom_range(1, 15));
      if (n >= 500) begin     // second half: a 0.7 V style window
        win0_ps = 16'd700;
        step_ps = 8'd20;
        vcc = vcc - 0.15;
      end
      t1 = model_delay(vcc, 0.5, int'(trc_trim));
      t2 = model_delay(vcc, 0.6, int'(trc_trim));
      o1 = model_ones(t1);
      o2 = model_ones(t2);
      @(posedge clk); #1;
      chk(ones(th_nom) == o1, $sformatf("nominal code at %f V: %0d expected %0d", vcc, ones(th_nom), o1));
      chk(ones(th_hi) == o2, $sformatf("high-VT code at %f V: %0d expected %0d", vcc, ones(th_hi), o2));
    end
    // monotonic in supply: falling supply, fewer stages reached
    trc_trim = '0;
    trc_seg_en = 4'hf;
    win0_ps = 16'd75;
    step_ps = 8'd10;
    prev_ones = N + 1;
    for (int k = 0; k < 40; k++) begin
      vcc = 1.2 - 0.01 * k;
      @(posedge clk); #1;
      chk(ones(th_nom) <= prev_ones, "code monotonic in supply");
      prev_ones = ones(th_nom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
