// tb_tuning_engine: self-checking test of the tuning sequencer with a
// synthetic cost surface instead of the regulator. The cost inputs are
// functions of the coefficients the engine applies; the testbench finds the
// minimum of the swept grid itself and checks the chosen pair and cost, the
// number of evaluations, the phase sequence of every evaluation (N_OPEN open,
// N_PRE closed at the low reference with costs cleared, N_EVAL enabled with
// the load step in the second half), the done pulse and the RUN state
// applying the best pair. Both cost modes are run on a 7 x 4 grid, then the
// delay-sum mode over every 7-bit (b1, b2) pair, 16384 evaluations.
module tb_tuning_engine;
  import ivr_pkg::*;

  localparam int NO = 4, NP = 3, NE = 10;
  logic clk = 0, rst_n = 0, start = 0;
  cost_mode_e mode = COST_DELAY_SUM;
  coef_t b0 = 7'sd20, b1_min = -7'sd50, b1_max = -7'sd20, b1_step = 7'sd5;
  coef_t b2_min = 7'sd10, b2_max = 7'sd40, b2_step = 7'sd10;
  duty_t d_open = 10'd600, d_fixed;
  cost_t cost_dsum, cost_ecnt, best_cost;
  logic loop_closed, ref_low, load_step, cost_clear, cost_en, busy, done;
  coefs_t coefs;
  coef_t best_b1, best_b2;
  logic [15:0] n_evals;
  always #5 clk = ~clk;

  tuning_engine #(.N_OPEN(NO), .N_PRE(NP), .N_EVAL(NE)) dut (.*);

  function automatic cost_t f_dsum(input int b1, input int b2);
    return cost_t'((b1 + 37) * (b1 + 37) + (b2 - 22) * (b2 - 22) + 100);
  endfunction
  function automatic cost_t f_ecnt(input int b1, input int b2);
    return cost_t'(((b1 + 22) < 0 ? -(b1 + 22) : (b1 + 22)) + ((b2 - 38) < 0 ? -(b2 - 38) : (b2 - 38)));
  endfunction
  assign cost_dsum = f_dsum(coefs.b1, coefs.b2);
  assign cost_ecnt = f_ecnt(coefs.b1, coefs.b2);

  int checks = 0, failures = 0;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // phase sequence monitor: classify each cycle while busy
  string seq;
  int run_len, bad_seq;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    chk(!loop_closed && d_fixed == d_open, "idle holds the loop open at d_open");
    for (int m = 0; m < 3; m++) begin
      int best, bb1, bb2, c, nev, nopen, npre, neval, nls, first_ls, ev_idx;
      mode = (m == 1) ? COST_ERROR_COUNT : COST_DELAY_SUM;
      if (m == 2) begin   // exhaustive: every 7-bit value of b1 and b2
        b1_min = -7'sd64; b1_max = 7'sd63; b1_step = 7'sd1;
        b2_min = -7'sd64; b2_max = 7'sd63; b2_step = 7'sd1;
      end
      best = 1 << 30;
      for (int b1 = int'(b1_min); b1 <= int'(b1_max); b1 += int'(b1_step))
        for (int b2 = int'(b2_min); b2 <= int'(b2_max); b2 += int'(b2_step)) begin
          c = (m == 1) ? int'(f_ecnt(b1, b2)) : int'(f_dsum(b1, b2));
          if (c < best) begin best = c; bb1 = b1; bb2 = b2; end
        end
      start = 1;
      @(posedge clk); #1;
      start = 0;
      nopen = 0; npre = 0; neval = 0; nls = 0; bad_seq = 0; first_ls = -1; ev_idx = 0;
      while (!done) begin
        if (!loop_closed) nopen++;
        if (ref_low) begin
          npre++;
          if (!cost_clear || !loop_closed || cost_en) bad_seq++;
        end
        if (cost_en) begin
          if (load_step && first_ls < 0) first_ls = ev_idx;
          if (load_step != (ev_idx >= NE / 2)) bad_seq++;
          neval++; ev_idx++;
          if (ev_idx == NE) begin ev_idx = 0; first_ls = -1; end
        end
        if (load_step) nls++;
        @(posedge clk); #1;
      end
      nev = (m == 2) ? 128 * 128 : 7 * 4;
      chk(n_evals == 16'(nev), $sformatf("evaluations %0d", n_evals));
      chk(nopen == nev * (NO + 1) + NO, $sformatf("open-loop cycles %0d", nopen));
      chk(npre == nev * NP, $sformatf("pre cycles %0d", npre));
      chk(neval == nev * NE, $sformatf("eval cycles %0d", neval));
      chk(nls == nev * (NE - NE / 2), $sformatf("load-step cycles %0d", nls));
      chk(bad_seq == 0, "phase sequence");
      chk(int'(best_b1) == bb1 && int'(best_b2) == bb2 && int'(best_cost) == best,
          $sformatf("best (%0d,%0d,%0d) expected (%0d,%0d,%0d)", best_b1, best_b2, best_cost, bb1, bb2, best));
      @(posedge clk); #1;
      chk(loop_closed && !ref_low && !load_step && coefs.b1 == best_b1 && coefs.b2 == best_b2 && coefs.b0 == b0,
          "RUN applies the best pair");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
