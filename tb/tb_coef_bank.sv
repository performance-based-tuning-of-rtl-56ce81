// tb_coef_bank: self-checking test of the per-operating-point coefficient
// store, built with four entries. Entries read invalid after reset; random
// writes to random indices are mirrored in a testbench array and every
// entry is read back and compared after each write, including the valid
// flag and an out-of-range write being ignored.
module tb_coef_bank;
  import ivr_pkg::*;

  localparam int N = 4;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_valid;
  logic [1:0] wr_idx = '0, rd_idx = '0;
  coef_t wr_b1 = '0, wr_b2 = '0, rd_b1, rd_b2;
  always #5 clk = ~clk;

  coef_bank #(.N_OP(N)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_b1[N], m_b2[N];
  bit m_v[N];
  initial begin
    foreach (m_v[i]) begin m_v[i] = 0; m_b1[i] = 0; m_b2[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int n = 0; n < 200; n++) begin
      wr_en  = ($urandom_range(0, 2) != 0);
      wr_idx = 2'($urandom_range(0, N - 1));
      wr_b1  = coef_t'($urandom_range(0, 127));
      wr_b2  = coef_t'($urandom_range(0, 127));
      @(posedge clk); #1;
      if (wr_en) begin m_v[wr_idx] = 1; m_b1[wr_idx] = int'(wr_b1); m_b2[wr_idx] = int'(wr_b2); end
      wr_en = 0;
      for (int i = 0; i < N; i++) begin
        rd_idx = 2'(i);
        #1;
        checks++;
        if (rd_valid != m_v[i] || (m_v[i] && (int'(rd_b1) != m_b1[i] || int'(rd_b2) != m_b2[i]))) begin
          failures++;
          $display("FAIL n=%0d entry %0d: valid %0d b1 %0d b2 %0d, expected %0d %0d %0d",
                   n, i, rd_valid, rd_b1, rd_b2, m_v[i], m_b1[i], m_b2[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
