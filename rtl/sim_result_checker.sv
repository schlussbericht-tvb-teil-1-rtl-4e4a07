// sim_result_checker: run-time equivalence check against recorded results.
//
// The sequence of results that the monitor produced in a design-time
// simulation of the same event stream is stored in the EXPECTED parameter
// (bit k is the k-th result, 1 = compliant).  At run time every result
// strobe is compared with the next stored bit.  After NUM_EXP results, done
// is set and equivalent tells whether every run-time result matched its
// recorded counterpart; mismatches counts the differences and first_bad the
// index of the first one.  Later results are ignored.
//
// Interface: result/result_valid from the monitor; compared, mismatches,
// first_bad, done, equivalent.  Timing: one cycle from result_valid.
//
// Origin: comparing run-time results with results recorded in a design-time
// simulation follows the reference design; recording verdicts as a parameter
// bit vector and the reported counts are this design's own.
module sim_result_checker #(
  parameter int unsigned NUM_EXP = 8,
  parameter logic [NUM_EXP-1:0] EXPECTED = '1,
  localparam int unsigned CW = $clog2(NUM_EXP + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          result,
  input  logic          result_valid,
  output logic [CW-1:0] compared,
  output logic [CW-1:0] mismatches,
  output logic [CW-1:0] first_bad,
  output logic          done,
  output logic          equivalent
);

  assign done       = (compared == CW'(NUM_EXP));
  assign equivalent = done && (mismatches == '0);

  // recorded result for the verdict now being compared
  logic exp_bit;
  always_comb begin
    exp_bit = 1'b0;
    for (int i = 0; i < NUM_EXP; i++)
      if (compared == CW'(i)) exp_bit = EXPECTED[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      compared   <= '0;
      mismatches <= '0;
      first_bad  <= '0;
    end else if (result_valid && !done) begin
      compared <= compared + 1'b1;
      if (result != exp_bit) begin
        if (mismatches == '0) first_bad <= compared;
        mismatches <= mismatches + 1'b1;
      end
    end
  end

endmodule
