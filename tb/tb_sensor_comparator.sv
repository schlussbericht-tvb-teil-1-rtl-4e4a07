// tb_sensor_comparator: drives a random GPIO value that often stays the same
// and checks that exactly the changes produce an event, one cycle later, with
// the new value.
//
// Origin: the stimulus, the expected values and the sizes used here are this
// testbench's own; the rules it checks are those of the design as described
// in its module header.
module tb_sensor_comparator;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] stream, ev;
  logic       marker;
  int checks = 0, failures = 0, n_events = 0;

  sensor_comparator dut (.clk, .rst_n, .event_stream (stream), .ev, .event_marker (marker));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] prev;
    stream = 8'h00;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    prev = 8'h00;
    for (int n = 0; n < 4000; n++) begin
      // change the value in roughly one cycle out of four
      if ($urandom_range(3) == 0) stream <= 8'($urandom_range(3));
      @(posedge clk); #1;
      // stream was sampled at this edge; compare with the value before it
      checks++;
      if (marker != (stream != prev)) begin
        failures++;
        $display("n=%0d marker=%0b stream=%h prev=%h", n, marker, stream, prev);
      end
      if (stream != prev) begin
        n_events++;
        checks++;
        if (ev != stream) failures++;
      end
      prev = stream;
    end
    checks++;
    if (n_events < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
