// tb_uart_event_link: connects uart_event_tx to uart_event_rx through a
// line on which glitches and a false frame can be injected.  Checks that
// every timed event arrives unchanged and in order, that a packet takes 90
// bit times, that a one-cycle glitch is ignored, that a broken frame is
// counted as a framing error without corrupting later packets, and that
// events beyond the FIFO are counted as overflow.
//
// Origin: the stimulus, the expected values and the sizes used here are this
// testbench's own; the rules it checks are those of the design as described
// in its module header.
module tb_uart_event_link;
  localparam int CLK_FREQ = 1_000_000;
  localparam int BAUD = 100_000;
  localparam int DIV = CLK_FREQ / BAUD;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  ev, rev;
  logic [63:0] tin, rtime;
  logic        valid, rvalid, txd, busy, line, force_low, glitch;
  logic [15:0] ovf, ferr;
  int checks = 0, failures = 0;
  int cyc = 0;

  uart_event_tx #(.CLK_FREQ (CLK_FREQ), .BAUD (BAUD)) u_tx (
    .clk, .rst_n, .ev, .time_in (tin), .valid, .txd, .busy, .overflow (ovf));
  uart_event_rx #(.CLK_FREQ (CLK_FREQ), .BAUD (BAUD)) u_rx (
    .clk, .rst_n, .rxd (line), .ev (rev), .time_out (rtime), .valid (rvalid), .frame_errors (ferr));

  assign line = txd & ~force_low & ~glitch;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [71:0] exp_q [$];
  int          start_cyc [$];
  int          n_rx = 0;
  int          high_run = 1000;

  // time of the first start bit of each packet: a falling edge after a
  // pause longer than any run of ones inside a packet
  always @(posedge clk) begin
    if (!rst_n) high_run <= 1000;
    else if (txd) high_run <= high_run + 1;
    else begin
      if (high_run > 15 * DIV) start_cyc.push_back(cyc);
      high_run <= 0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (rvalid) begin
      logic [71:0] e;
      int d;
      e = exp_q.pop_front();
      checks++;
      if ({rev, rtime} != e) begin
        failures++; $display("got %h %h want %h", rev, rtime, e);
      end
      d = cyc - start_cyc.pop_front();
      checks++;
      if (d < 90 * DIV - DIV || d > 90 * DIV + 6) begin
        failures++; $display("packet took %0d cycles", d);
      end
      n_rx++;
    end
  end

  task automatic send(logic [7:0] e, logic [63:0] t);
    ev <= e; tin <= t; valid <= 1'b1;
    exp_q.push_back({e, t});
    @(posedge clk);
    valid <= 1'b0;
  endtask

  initial begin
    valid = 0; ev = 0; tin = 0; force_low = 0; glitch = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) @(posedge clk);
    for (int k = 0; k < 30; k++) begin
      send(8'($urandom), {32'($urandom), 32'($urandom)});
      if (k % 5 == 0) send(8'($urandom), {32'($urandom), 32'($urandom)});  // back to back
      repeat (1300 + $urandom_range(1200)) @(posedge clk);
      if (k == 10) begin                      // single-cycle glitch on an idle line
        repeat (2) @(posedge clk); wait (!busy);
        glitch <= 1'b1; @(posedge clk); glitch <= 1'b0;
      end
    end
    repeat (2) @(posedge clk); wait (!busy);
    repeat (200) @(posedge clk);
    checks++;
    if (n_rx != 36 || exp_q.size() != 0) begin failures++; $display("received %0d", n_rx); end
    checks++;
    if (ferr != 0) failures++;
    // a false frame: line low for 12 bit times -> framing error
    force_low <= 1'b1;
    repeat (12 * DIV) @(posedge clk);
    force_low <= 1'b0;
    repeat (40 * DIV) @(posedge clk);
    checks++;
    if (ferr != 1) begin failures++; $display("frame errors %0d", ferr); end
    // link still works afterwards
    send(8'h5a, 64'h0123_4567_89ab_cdef);
    repeat (2) @(posedge clk); wait (!busy);
    repeat (200) @(posedge clk);
    checks++;
    if (n_rx != 37) failures++;
    // overflow: six events in a row, FIFO holds four (one is taken at once)
    for (int k = 0; k < 6; k++) begin
      ev <= 8'(k); tin <= 64'(k); valid <= 1'b1;
      if (k < 5) exp_q.push_back({8'(k), 64'(k)});
      @(posedge clk);
    end
    valid <= 1'b0;
    repeat (2) @(posedge clk); wait (!busy);
    repeat (200) @(posedge clk);
    checks += 2;
    if (ovf != 1) begin failures++; $display("overflow %0d", ovf); end
    if (n_rx != 42) begin failures++; $display("received %0d", n_rx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
