// tb_stmo_monitor: drives timed events straight into the monitor (WINDOW 6,
// three bins, two measurements per bin, tolerance 0, sliding window,
// reaction pattern, filter in the monitor).  A reference model here keeps
// the latencies, forms the histogram of the latest six for every new pair
// and predicts each window outcome and the majority verdict.  The stream has
// a compliant phase, a phase with the wrong distribution, an out-of-range
// latency and irrelevant events that the filter must drop.  Also checks the
// alarm, the log and the cycles from the completing event to the outcome.
//
// Origin: the stimulus, the expected values and the sizes used here are this
// testbench's own; the rules it checks are those of the design as described
// in its module header.
module tb_stmo_monitor;
  localparam int W = 6;
  localparam int NB = 3;
  localparam logic [NB:0][63:0]   EDGES = {64'd400, 64'd300, 64'd200, 64'd100};
  localparam logic [NB-1:0][15:0] SPEC  = {16'd2, 16'd2, 16'd2};
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  in_ev;
  logic [63:0] in_time;
  logic        in_valid, clr;
  logic [3:0]  log_idx;
  logic verdict, vv, vs, outcome, ov, processing, alarm, irq;
  logic [15:0] fails, oor, nmeas, dropped;
  logic [NB-1:0][15:0] bc;
  logic [2:0] fill;
  logic [81:0] log_data;
  logic [4:0]  log_count;
  logic [31:0] log_total;
  logic [NB-1:0] bin_ok;
  int checks = 0, failures = 0;
  int cyc = 0, last_stop_cyc = 0;

  stmo_monitor #(.WINDOW (W), .NUM_BINS (NB), .BIN_EDGES (EDGES), .SPEC_COUNTS (SPEC),
                 .TOLERANCE (0), .WIN_TYPE (stmo_pkg::WIN_SLIDING)) dut (
    .clk, .rst_n, .in_ev, .in_time, .in_valid, .alarm_clear (clr), .log_rd_idx (log_idx),
    .verdict, .verdict_valid (vv), .verdict_strobe (vs), .outcome, .outcome_valid (ov),
    .processing, .alarm, .irq, .fail_count (fails), .bin_counts (bc), .out_of_range (oor),
    .n_meas (nmeas), .win_fill (fill), .dropped, .log_rd_data (log_data), .log_count,
    .log_total, .bin_ok);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint lats [$];
  bit     exp_out [$];
  bit     outs [$];
  int     n_ov = 0, n_vs = 0, n_irq = 0;

  function automatic bit window_ok();
    int cnt [NB];
    cnt = '{default: 0};
    for (int i = lats.size() - W; i < lats.size(); i++)
      for (int b = 0; b < NB; b++)
        if (lats[i] >= longint'(EDGES[b]) && (lats[i] < longint'(EDGES[b+1]) ||
            (b == NB-1 && lats[i] == longint'(EDGES[b+1])))) cnt[b]++;
    for (int b = 0; b < NB; b++) if (cnt[b] != int'(SPEC[b])) return 1'b0;
    return 1'b1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ov) begin
      int d;
      checks++;
      if (n_ov >= exp_out.size() || outcome != exp_out[n_ov]) begin
        failures++; $display("outcome %0d = %0b", n_ov, outcome);
      end
      // filter 1 + accept 1 + copy 1 + sort W + measure W + assess 1, seen one edge later
      d = cyc - last_stop_cyc;
      checks++;
      if (d != 2 * W + 5) begin failures++; $display("outcome after %0d cycles", d); end
      outs.push_back(outcome);
      n_ov++;
    end
    if (vs) begin
      int s;
      s = outs[outs.size()-1] + outs[outs.size()-2] + outs[outs.size()-3];
      checks++;
      if (verdict != (s >= 2) || !vv) begin failures++; $display("verdict %0d = %0b", n_vs, verdict); end
      n_vs++;
    end
    if (irq) n_irq++;
  end

  task automatic ev(logic [7:0] e, longint t);
    in_ev <= e; in_time <= 64'(t); in_valid <= 1'b1;
    @(posedge clk);
    in_valid <= 1'b0;
  endtask

  task automatic pair(longint t, longint lat);
    ev(8'h01, t);
    ev(8'h05, t + 3);             // not in the specification: filtered out
    ev(8'h02, t + lat);
    last_stop_cyc = cyc;
    lats.push_back(lat);
    if (lats.size() >= W) exp_out.push_back(window_ok());
    repeat (3 * W) @(posedge clk);
  endtask

  initial begin
    longint t;
    in_valid = 0; in_ev = 0; in_time = 0; clr = 0; log_idx = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    t = 10_000;
    // compliant: bins 0,1,2,0,1,2,...  (latency 400 sits on the closed last edge)
    for (int k = 0; k < 12; k++) begin
      pair(t, (k % 3 == 0) ? 100 + $urandom_range(99) : (k % 3 == 1) ? 200 + $urandom_range(99) : 300 + $urandom_range(100));
      t += 1000;
    end
    checks++;
    if (alarm || !verdict || !vv) failures++;
    // wrong distribution: everything in bin 1, one latency out of range
    for (int k = 0; k < 5; k++) begin
      pair(t, (k == 2) ? 50 : 250);
      t += 1000;
    end
    checks += 3;
    if (!alarm || verdict) failures++;
    if (n_irq != 1) failures++;
    if (oor != 1) begin failures++; $display("out of range %0d", oor); end
    // the log: newest record holds the last outcome and verdict and the stop time
    log_idx = 0; #1;
    checks += 2;
    if (log_data[1] != outs[outs.size()-1] || log_data[0] != verdict) failures++;
    if (log_data[81:18] != 64'(t - 1000 + 250)) begin failures++; $display("log time %0d", log_data[81:18]); end
    log_idx = 4; #1;
    checks++;
    if (log_data[1] != outs[outs.size()-5]) failures++;
    checks += 2;
    if (log_count != 5'(n_ov) || log_total != 32'(n_ov)) failures++;
    if (fails == 0) failures++;
    // back to compliant, the alarm stays until cleared
    for (int k = 0; k < 9; k++) begin
      pair(t, (k % 3 == 0) ? 150 : (k % 3 == 1) ? 250 : 350);
      t += 1000;
    end
    checks += 2;
    if (!verdict) failures++;
    if (!alarm) failures++;
    clr <= 1'b1; @(posedge clk); clr <= 1'b0; @(posedge clk);
    checks++;
    if (alarm) failures++;
    checks += 2;
    if (n_ov != 26 - W + 1) begin failures++; $display("outcomes %0d", n_ov); end
    if (dropped != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
