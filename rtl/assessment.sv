// assessment: compares the measured histogram of a window with the
// specified one.
//
// When asses pulses, the absolute difference between the measured and the
// specified count of every bin is formed; the window complies when every
// difference is at most TOLERANCE (one tolerance, in measurements, for all
// bins).  The result is registered in outcome (1 = within the specification)
// with outcome_valid high for one cycle; bin_ok shows which bins passed.
//
// Interface: bin_counts/asses from the measurement unit; outcome,
// outcome_valid, bin_ok.  Timing: one cycle from asses to outcome_valid.
//
// Origin: the per-bin absolute difference against one tolerance for all bins,
// compliant when every difference is within it, follows the reference design;
// counting the tolerance in measurements (rather than percent) and the reset
// value are choices made here.
module assessment #(
  parameter int unsigned NUM_BINS  = stmo_pkg::DEF_NUM_BINS,
  parameter int unsigned CNT_W     = 16,
  parameter logic [NUM_BINS-1:0][CNT_W-1:0] SPEC_COUNTS = stmo_pkg::DEF_SPEC_COUNTS,
  parameter int unsigned TOLERANCE = stmo_pkg::DEF_TOLERANCE
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NUM_BINS-1:0][CNT_W-1:0] bin_counts,
  input  logic                           asses,
  output logic                           outcome,
  output logic                           outcome_valid,
  output logic [NUM_BINS-1:0]            bin_ok
);

  logic [NUM_BINS-1:0] ok;

  always_comb begin
    for (int b = 0; b < NUM_BINS; b++) begin
      logic [CNT_W-1:0] diff;
      diff  = (bin_counts[b] >= SPEC_COUNTS[b]) ? bin_counts[b] - SPEC_COUNTS[b]
                                                : SPEC_COUNTS[b] - bin_counts[b];
      ok[b] = ({1'b0, diff} <= (CNT_W+1)'(TOLERANCE));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      outcome       <= 1'b1;
      outcome_valid <= 1'b0;
      bin_ok        <= '1;
    end else begin
      outcome_valid <= asses;
      if (asses) begin
        outcome <= &ok;
        bin_ok  <= ok;
      end
    end
  end

endmodule
