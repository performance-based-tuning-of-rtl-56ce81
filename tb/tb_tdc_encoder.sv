// tb_tdc_encoder: self-checking test of the Vernier code encoder. Random
// thermometer codes, some with bubbles, and random reference codes are
// applied; the delay code must equal the number of zero stages and the
// slack ref - delay, both one clock later.
module tb_tdc_encoder;
  import ivr_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [N_STAGES-1:0] thermo = '0;
  dcode_t ref_code = '0, dcode;
  slack_t slack;
  always #5 clk = ~clk;

  tdc_encoder dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int zeros, exp_slack, arrive;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int n = 0; n < 2000; n++) begin
      arrive = $urandom_range(0, N_STAGES);
      thermo = '0;
      for (int i = 0; i < N_STAGES; i++) thermo[i] = (i >= arrive);
      if (n % 3 == 0 && arrive > 1 && arrive < N_STAGES - 1) begin
        thermo[arrive] = 1'b0;       // bubble
        thermo[arrive - 2] = 1'b1;
      end
      ref_code = dcode_t'($urandom_range(0, N_STAGES));
      zeros = 0;
      for (int i = 0; i < N_STAGES; i++) if (!thermo[i]) zeros++;
      exp_slack = int'(ref_code) - zeros;
      @(posedge clk); #1;
      checks += 2;
      if (int'(dcode) != zeros) begin failures++; $display("FAIL dcode %0d exp %0d", dcode, zeros); end
      if (int'(slack) != exp_slack) begin failures++; $display("FAIL slack %0d exp %0d", slack, exp_slack); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
