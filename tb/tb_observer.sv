// tb_observer: writes event codes to the GPIO input at chosen cycles and
// checks the timed events of two observers, without and with the event
// filter: every change must appear with a time stamp that differs from the
// write cycle by a constant, and only the filtered observer drops codes that
// are not in the list.
//
// Origin: the stimulus, the expected values and the sizes used here are this
// testbench's own; the rules it checks are those of the design as described
// in its module header.
module tb_observer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  gpio;
  logic [7:0]  ev0, ev1;
  logic [63:0] t0, t1, now0, now1;
  logic        v0, v1;
  int checks = 0, failures = 0;
  int cyc = 0;

  observer #(.FILT_OBS (1'b0)) u_nofilt (.clk, .rst_n, .gpio_in (gpio),
    .out_ev (ev0), .out_time (t0), .out_valid (v0), .now (now0));
  observer #(.FILT_OBS (1'b1)) u_filt (.clk, .rst_n, .gpio_in (gpio),
    .out_ev (ev1), .out_time (t1), .out_valid (v1), .now (now1));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected streams
  logic [7:0]  exp_ev [$];
  int          exp_wr [$];
  logic [7:0]  exp_ev_f [$];
  int          exp_wr_f [$];
  int          n0 = 0, n1 = 0;
  longint      off0, off1;
  bit          have0 = 0, have1 = 0;

  always @(posedge clk) if (rst_n) begin
    if (v0) begin
      logic [7:0] e; int w;
      e = exp_ev.pop_front(); w = exp_wr.pop_front();
      checks++;
      if (ev0 != e) failures++;
      if (!have0) begin off0 = longint'(t0) - w; have0 = 1; end
      checks++;
      if (longint'(t0) - w != off0) begin
        failures++;
        $display("unfiltered: event %h written at %0d stamped %0d", e, w, t0);
      end
      n0++;
    end
    if (v1) begin
      logic [7:0] e; int w;
      e = exp_ev_f.pop_front(); w = exp_wr_f.pop_front();
      checks++;
      if (ev1 != e) failures++;
      if (!have1) begin off1 = longint'(t1) - w; have1 = 1; end
      checks++;
      if (longint'(t1) - w != off1) failures++;
      n1++;
    end
  end

  initial begin
    logic [7:0] cur, nxt;
    gpio = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    cur = 0;
    for (int k = 0; k < 300; k++) begin
      repeat ($urandom_range(40) + 2) @(posedge clk);
      nxt = 8'($urandom_range(4));
      if (nxt == cur) nxt = cur + 1;
      gpio <= nxt;
      exp_ev.push_back(nxt);  exp_wr.push_back(cyc);
      if (nxt == 8'h01 || nxt == 8'h02) begin
        exp_ev_f.push_back(nxt); exp_wr_f.push_back(cyc);
      end
      cur = nxt;
    end
    repeat (20) @(posedge clk);
    checks++;
    if (n0 != 300 || exp_ev.size() != 0) failures++;
    checks++;
    if (n1 == 0 || n1 >= 300 || exp_ev_f.size() != 0) failures++;
    // the time stamp follows the write by a constant: one cycle more with the filter
    checks++;
    if (off1 != off0 + 1) failures++;
    checks++;
    if (now0 != now1) failures++;
    $display("unfiltered %0d events (offset %0d), filtered %0d (offset %0d)", n0, off0, n1, off1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
