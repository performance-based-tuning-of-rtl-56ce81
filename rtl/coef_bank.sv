// coef_bank: per-operating-point store of tuned compensator coefficients.
//
// The tuner finds one best (b1, b2) pair per run, and the best pair depends
// on the operating condition (supply level, load). This bank keeps one pair
// per operating point so that, once each point has been tuned, the regulator
// can move between them (for example between DVFS levels) and always run
// with the pair tuned for the current one.
//
// Interface: a write (wr_en, one cycle) stores wr_b1/wr_b2 at wr_idx and
// marks that entry valid; the read port is combinational from the registers:
// rd_b1/rd_b2 of entry rd_idx and whether it has been written (rd_valid).
// Entries are invalid after reset. N_OP = 2 matches the two supply levels
// the design was evaluated at; the bank itself is this implementation's
// reading of "different coefficients for different operating conditions".
module coef_bank
  import ivr_pkg::*;
#(
  parameter int N_OP = 2,
  localparam int IW = (N_OP > 1) ? $clog2(N_OP) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [IW-1:0] wr_idx,
  input  coef_t         wr_b1,
  input  coef_t         wr_b2,
  input  logic [IW-1:0] rd_idx,
  output coef_t         rd_b1,
  output coef_t         rd_b2,
  output logic          rd_valid
);

  typedef struct packed {
    logic  valid;
    coef_t b1;
    coef_t b2;
  } entry_t;

  entry_t bank [N_OP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_OP; i++) bank[i] <= '0;
    end else if (wr_en && int'(wr_idx) < N_OP) begin
      bank[wr_idx] <= '{valid: 1'b1, b1: wr_b1, b2: wr_b2};
    end
  end

  always_comb begin
    if (int'(rd_idx) < N_OP) begin
      rd_b1    = bank[rd_idx].b1;
      rd_b2    = bank[rd_idx].b2;
      rd_valid = bank[rd_idx].valid;
    end else begin
      rd_b1    = '0;
      rd_b2    = '0;
      rd_valid = 1'b0;
    end
  end

endmodule
