// tb_stmo_full: the monitoring system at its default size, unchanged.
//
// The default specification is the CAN firmware of the reference
// evaluation: a sliding window of 30 reaction measurements at 50 MHz, three
// bins [251000,266000) [266000,286000) [286000,301000] cycles (5.02 ms to
// 6.02 ms), ten measurements per bin, tolerance 0.  A firmware model writes
// 0x01 and 0x02 around each execution.  39 executions cycle through the
// three bins (258000, 276000, 293000 cycles, with a small random spread),
// which gives ten positive outcomes and eight positive verdicts; these match
// the default recorded results, so the equivalence check must pass.  Four
// executions of 276000 cycles follow.  Each makes its window non-compliant,
// so the verdict turns negative and the alarm rises.  About 12 million
// cycles are simulated.
//
// Origin: the stimulus, the expected values and the sizes used here are this
// testbench's own; the rules it checks are those of the design as described
// in its module header.
module tb_stmo_full;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] gpio = 8'h00;
  logic       verdict, outcome, ovalid, alarm, equiv_done, equiv_ok;
  logic [2:0][15:0] bin_counts;
  logic [15:0] out_of_range;

  stmo_system dut (
    .clk, .rst_n, .gpio_in (gpio), .alarm_clear (1'b0), .log_rd_idx ('0),
    .verdict, .verdict_valid (), .outcome, .outcome_valid (ovalid), .processing (),
    .alarm, .irq (), .fail_count (), .bin_counts, .out_of_range, .n_meas (), .bin_ok (),
    .win_fill (), .dropped (), .log_rd_data (), .log_count (), .log_total (),
    .equiv_done, .equiv_ok, .equiv_mismatches (), .equiv_compared (), .equiv_first_bad (),
    .obs_ev (), .obs_time (), .obs_valid (), .global_time (), .link_txd (), .link_errors ());

  int checks = 0, failures = 0;
  bit outs [$];

  always #10 clk = ~clk;     // 50 MHz

  initial begin : watchdog
    repeat (14_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ovalid) outs.push_back(outcome);

  task automatic execute(int lat);
    gpio <= 8'h01;
    repeat (lat) @(posedge clk);
    gpio <= 8'h02;
    repeat (200) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 39; k++)
      execute((k % 3 == 0 ? 258000 : k % 3 == 1 ? 276000 : 293000) + $urandom_range(4000) - 2000);
    checks += 3;
    if (outs.size() != 10) failures++;
    if (!equiv_done || !equiv_ok) failures++;
    if (!verdict || alarm) failures++;
    for (int k = 0; k < 4; k++) execute(276000);
    repeat (200) @(posedge clk);
    checks += 4;
    if (outs.size() != 14) failures++;
    foreach (outs[k]) begin
      checks++;
      if (outs[k] != (k < 10)) failures++;
    end
    if (verdict || !alarm) failures++;
    if (!equiv_ok) failures++;
    if (bin_counts[0] != 8 || bin_counts[1] != 13 || bin_counts[2] != 9 || out_of_range != 0) failures++;
    $display("outcomes %0d, verdict %0d, alarm %0d, equivalence %0d", outs.size(), verdict, alarm, equiv_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
