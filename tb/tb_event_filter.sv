// tb_event_filter: random events, some named in the list and some not;
// checks that exactly the listed events come out, one cycle later, with
// their tag.
//
// Origin: the stimulus, the expected values and the sizes used here are this
// testbench's own; the rules it checks are those of the design as described
// in its module header.
module tb_event_filter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  ev_in, ev_out;
  logic [63:0] tag_in, tag_out;
  logic        mk_in, mk_out;
  int checks = 0, failures = 0, passed = 0, blocked = 0;

  event_filter #(.NUM_EV (3), .EV_LIST ({8'h07, 8'h02, 8'h01})) dut (
    .clk, .rst_n, .ev_in, .tag_in, .event_marker_in (mk_in),
    .ev_out, .tag_out, .event_marker_out (mk_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  e;
    logic [63:0] t;
    logic        m, hit;
    mk_in = 0; ev_in = 0; tag_in = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 3000; n++) begin
      e = 8'($urandom_range(8));
      t = {32'($urandom), 32'($urandom)};
      m = ($urandom_range(1) == 1);
      ev_in <= e; tag_in <= t; mk_in <= m;
      @(posedge clk); #1;
      hit = m && (e == 8'h01 || e == 8'h02 || e == 8'h07);
      checks++;
      if (mk_out != hit) begin
        failures++;
        $display("n=%0d ev=%h mk=%0b out=%0b", n, e, m, mk_out);
      end
      if (hit) begin
        passed++;
        checks++;
        if (ev_out != e || tag_out != t) failures++;
      end else if (m) blocked++;
    end
    checks++;
    if (passed < 100 || blocked < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
