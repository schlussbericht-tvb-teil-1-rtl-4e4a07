// tb_assessment: random measured histograms close to the specified one;
// the outcome must be 1 exactly when every bin is within the tolerance.
//
// Origin: the stimulus, the expected values and the sizes used here are this
// testbench's own; the rules it checks are those of the design as described
// in its module header.
module tb_assessment;
  localparam int NB = 4;
  localparam int TOL = 2;
  localparam logic [NB-1:0][15:0] SPEC = {16'd5, 16'd20, 16'd40, 16'd35};
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NB-1:0][15:0] bc;
  logic asses, outcome, ov;
  logic [NB-1:0] bin_ok;
  int checks = 0, failures = 0, n_pass = 0, n_fail = 0;

  assessment #(.NUM_BINS (NB), .SPEC_COUNTS (SPEC), .TOLERANCE (TOL)) dut (
    .clk, .rst_n, .bin_counts (bc), .asses, .outcome, .outcome_valid (ov), .bin_ok);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_ok;
    asses = 0; bc = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 2000; n++) begin
      exp_ok = 1;
      for (int b = 0; b < NB; b++) begin
        int v, d;
        v = int'(SPEC[b]) + $urandom_range(6) - 3;
        bc[b] = 16'(v);
        d = v - int'(SPEC[b]);
        if (d < 0) d = -d;
        if (d > TOL) exp_ok = 0;
      end
      asses <= 1'b1;
      @(posedge clk);
      asses <= 1'b0;
      #1;
      checks += 2;
      if (!ov) failures++;
      if (outcome != exp_ok) begin failures++; $display("counts %p outcome %0b", bc, outcome); end
      if (exp_ok) n_pass++; else n_fail++;
      @(posedge clk); #1;
      checks++;
      if (ov) failures++;
    end
    checks++;
    if (n_pass < 50 || n_fail < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
