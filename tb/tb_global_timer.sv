// tb_global_timer: checks that the global time base counts clock cycles from
// zero after reset, and restarts when reset is applied again.
//
// Origin: the stimulus, the expected values and the sizes used here are this
// testbench's own; the rules it checks are those of the design as described
// in its module header.
module tb_global_timer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [63:0] now;
  int checks = 0, failures = 0;

  global_timer dut (.clk, .rst_n, .now);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(posedge clk); #1;
      checks++;
      if (now != 64'(n + 1)) begin
        failures++;
        $display("cycle %0d: now=%0d", n, now);
      end
    end
    rst_n <= 1'b0;
    @(posedge clk); #1;
    checks++;
    if (now != 0) failures++;
    rst_n <= 1'b1;
    repeat (17) @(posedge clk); #1;
    checks++;
    if (now != 17) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
