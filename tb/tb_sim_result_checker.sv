// tb_sim_result_checker: plays a matching and a differing result sequence
// against a stored one and checks the mismatch count, the first bad index,
// done and equivalent.
//
// Origin: the stimulus, the expected values and the sizes used here are this
// testbench's own; the rules it checks are those of the design as described
// in its module header.
module tb_sim_result_checker;
  localparam logic [7:0] EXP = 8'b1011_0111;
  logic clk = 1'b0, rst_n = 1'b0;
  logic result, rv, done, eq;
  logic [3:0] cmp, mis, fb;
  int checks = 0, failures = 0;

  sim_result_checker #(.NUM_EXP (8), .EXPECTED (EXP)) dut (.clk, .rst_n, .result,
    .result_valid (rv), .compared (cmp), .mismatches (mis), .first_bad (fb), .done, .equivalent (eq));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic play(logic [9:0] seq, int nres);
    for (int k = 0; k < nres; k++) begin
      result <= seq[k]; rv <= 1'b1;
      @(posedge clk);
      rv <= 1'b0;
      repeat (2) @(posedge clk);
    end
    #1;
  endtask

  initial begin
    result = 0; rv = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    play({2'b00, EXP}, 7);
    checks += 3;
    if (done || eq || cmp != 7) failures++;
    if (mis != 0) failures++;
    play(10'b00_0000_0001, 3);    // the 8th matches, two more are ignored
    checks += 3;
    if (!done || !eq) failures++;
    if (cmp != 8 || mis != 0) failures++;
    // second run: results 2 and 5 differ
    rst_n <= 1'b0; @(posedge clk); rst_n <= 1'b1; @(posedge clk);
    play({2'b00, EXP ^ 8'b0010_0100}, 8);
    checks += 4;
    if (!done || eq) failures++;
    if (mis != 2) failures++;
    if (fb != 2) failures++;
    if (cmp != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
