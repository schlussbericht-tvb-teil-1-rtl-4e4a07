// tb_event_synchronizer: feeds windows of start/stop events whose time
// stamps arrive out of order and checks the sorted arrays against a sorted
// copy made here, for a jumping reaction window, a sliding reaction window
// and a jumping repetitive window (all WINDOW = 8).  Also checks that the
// sort takes WINDOW cycles after the copy and that a sliding window resorts
// on every new start/stop pair.
//
// Origin: the stimulus, the expected values and the sizes used here are this
// testbench's own; the rules it checks are those of the design as described
// in its module header.
module tb_event_synchronizer;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  in_ev;
  logic [63:0] in_time;
  logic        in_valid;

  logic [W-1:0][63:0] sa_j, so_j, sa_s, so_s, sa_r, so_r;
  logic is_j, is_s, is_r, srt_j, srt_s, srt_r;
  logic [3:0] fill_j, fill_s, fill_r;
  logic [15:0] drop_j, drop_s, drop_r;
  int checks = 0, failures = 0;

  event_synchronizer #(.WINDOW (W), .PATTERN (stmo_pkg::PAT_REACTION), .WIN_TYPE (stmo_pkg::WIN_JUMPING)) u_j (
    .clk, .rst_n, .in_ev, .in_time, .in_valid, .meas_busy (1'b0),
    .start_sorted (sa_j), .stop_sorted (so_j), .is_sorted (is_j), .sorting (srt_j),
    .win_fill (fill_j), .dropped (drop_j));
  event_synchronizer #(.WINDOW (W), .PATTERN (stmo_pkg::PAT_REACTION), .WIN_TYPE (stmo_pkg::WIN_SLIDING)) u_s (
    .clk, .rst_n, .in_ev, .in_time, .in_valid, .meas_busy (1'b0),
    .start_sorted (sa_s), .stop_sorted (so_s), .is_sorted (is_s), .sorting (srt_s),
    .win_fill (fill_s), .dropped (drop_s));
  event_synchronizer #(.WINDOW (W), .PATTERN (stmo_pkg::PAT_REPETITIVE), .WIN_TYPE (stmo_pkg::WIN_JUMPING)) u_r (
    .clk, .rst_n, .in_ev, .in_time, .in_valid, .meas_busy (1'b0),
    .start_sorted (sa_r), .stop_sorted (so_r), .is_sorted (is_r), .sorting (srt_r),
    .win_fill (fill_r), .dropped (drop_r));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // history of everything sent, in arrival order
  longint starts [$];
  longint stops  [$];
  longint alls   [$];
  int n_j = 0, n_s = 0, n_r = 0;
  int cyc = 0, last_send = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic bit cmp_sorted(logic [W-1:0][63:0] got, longint src[$], int first);
    longint ref_q [$];
    for (int i = 0; i < W; i++) ref_q.push_back(src[first + i]);
    ref_q.sort();
    for (int i = 0; i < W; i++) if (got[i] != 64'(ref_q[i])) return 1'b0;
    return 1'b1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (is_j) begin
      checks++;
      if (!cmp_sorted(sa_j, starts, n_j * W) || !cmp_sorted(so_j, stops, n_j * W)) begin
        failures++; $display("jumping window %0d wrong", n_j);
      end
      n_j++;
    end
    if (is_s) begin
      // sliding: the latest W entries
      checks++;
      if (!cmp_sorted(sa_s, starts, starts.size() - W) || !cmp_sorted(so_s, stops, stops.size() - W)) begin
        failures++; $display("sliding window %0d wrong", n_s);
      end
      // copy one cycle after the completing event, then W sort cycles
      checks++;
      if (cyc - last_send != W + 2) begin
        failures++; $display("sliding sort latency %0d", cyc - last_send);
      end
      n_s++;
    end
    if (is_r) begin
      checks++;
      if (!cmp_sorted(sa_r, alls, n_r * W)) begin
        failures++; $display("repetitive window %0d wrong", n_r);
      end
      n_r++;
    end
  end

  task automatic send(logic [7:0] e, longint t);
    in_ev <= e; in_time <= 64'(t); in_valid <= 1'b1;
    @(posedge clk);
    in_valid <= 1'b0;
    last_send = cyc;
    if (e == 8'h01) starts.push_back(t);
    if (e == 8'h02) stops.push_back(t);
    alls.push_back(t);
  endtask

  initial begin
    longint base;
    in_valid = 0; in_ev = 0; in_time = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    base = 1000;
    // 4 windows of pairs; within a pair the stop may arrive before the start,
    // and time stamps jitter so arrival order differs from time order
    for (int k = 0; k < 4 * W; k++) begin
      longint ts, tp;
      ts = base + $urandom_range(300);
      tp = ts + 50 + $urandom_range(200);
      if ($urandom_range(1)) begin send(8'h01, ts); send(8'h02, tp); end
      else                   begin send(8'h02, tp); send(8'h01, ts); end
      base += 200;
      repeat (3 * W) @(posedge clk);
    end
    repeat (4 * W) @(posedge clk);
    checks++;
    if (n_j != 4) failures++;
    // sliding: one sort per pair once the window is full
    checks++;
    if (n_s != 4 * W - W + 1) begin failures++; $display("sliding sorts %0d", n_s); end
    checks++;
    if (n_r != 8) failures++;
    checks++;
    if (fill_s != 4'(W) || drop_j != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
