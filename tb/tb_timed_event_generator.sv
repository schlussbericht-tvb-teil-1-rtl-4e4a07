// tb_timed_event_generator: random event markers against a running time
// value; every event must come out one cycle later with the time of the
// cycle in which it was marked.
//
// Origin: the stimulus, the expected values and the sizes used here are this
// testbench's own; the rules it checks are those of the design as described
// in its module header.
module tb_timed_event_generator;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  ev, out_ev;
  logic        mk, out_valid;
  logic [63:0] gtime, out_time;
  int checks = 0, failures = 0, n_ev = 0;

  timed_event_generator dut (.clk, .rst_n, .ev, .event_marker (mk), .global_time (gtime),
                             .out_ev, .out_time, .out_valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  e;
    logic        m;
    logic [63:0] t;
    mk = 0; ev = 0; gtime = 64'h0000_0001_0000_0000;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 3000; n++) begin
      e = 8'($urandom);
      m = ($urandom_range(2) == 0);
      t = gtime + 64'($urandom_range(5) + 1);
      ev <= e; mk <= m; gtime <= t;
      @(posedge clk); #1;
      checks++;
      if (out_valid != m) failures++;
      if (m) begin
        n_ev++;
        checks++;
        if (out_ev != e || out_time != t) begin
          failures++;
          $display("n=%0d got %h@%0d want %h@%0d", n, out_ev, out_time, e, t);
        end
      end
    end
    checks++;
    if (n_ev < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
