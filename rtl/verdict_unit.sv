// verdict_unit: majority decision over the last assessment outcomes.
//
// A single window that misses the specification may be a transient.  The
// unit keeps the last HISTORY outcomes (three) and gives a positive verdict
// when at least MAJORITY of them (two) are positive.  Until HISTORY outcomes
// have been seen, verdict stays 1 and verdict_valid stays 0 (cold start).
//
// Interface: outcome/outcome_valid from the assessment unit; verdict,
// verdict_valid (high from the HISTORY-th outcome on) and verdict_strobe
// (one cycle for each new verdict).
// Timing: one cycle from outcome_valid to the updated verdict.
//
// Origin: the 2-of-3 majority over the last three outcomes follows the
// reference design; the behaviour before three outcomes exist is this
// design's own.
module verdict_unit #(
  parameter int unsigned HISTORY  = 3,
  parameter int unsigned MAJORITY = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic outcome,
  input  logic outcome_valid,
  output logic verdict,
  output logic verdict_valid,
  output logic verdict_strobe
);

  localparam int unsigned NW = $clog2(HISTORY + 1);

  logic [HISTORY-2:0] hist;      // the previous HISTORY-1 outcomes
  logic [HISTORY-1:0] hist_nx;
  logic [NW-1:0]      seen;
  logic [NW-1:0]      ones;

  always_comb begin
    hist_nx = {hist, outcome};
    ones    = '0;
    for (int i = 0; i < HISTORY; i++) ones = ones + NW'(hist_nx[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hist           <= '0;
      seen           <= '0;
      verdict        <= 1'b1;
      verdict_valid  <= 1'b0;
      verdict_strobe <= 1'b0;
    end else begin
      verdict_strobe <= 1'b0;
      if (outcome_valid) begin
        hist <= hist_nx[HISTORY-2:0];
        if (seen != NW'(HISTORY)) seen <= seen + 1'b1;
        if (seen >= NW'(HISTORY - 1)) begin
          verdict        <= (ones >= NW'(MAJORITY));
          verdict_valid  <= 1'b1;
          verdict_strobe <= 1'b1;
        end
      end
    end
  end

endmodule
