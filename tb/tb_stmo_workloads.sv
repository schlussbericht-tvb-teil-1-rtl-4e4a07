// tb_stmo_workloads: the monitoring system on the specifications it was
// evaluated with, at their real window sizes and bin shares.
//
//   S1  constant execution time: sliding window of 100, one bin holding
//       exactly the nominal time, tolerance 0.  The nominal 54.65 ms is
//       taken as 5465 cycles (one cycle per 10 us) to keep the run short.
//   S2  jumping window of 100, tolerance 5 % (5 executions), six bins of
//       17/17/17/17/16/16 % around 5.6 with steps of 0.5; one cycle stands
//       for 0.1 time unit, so the bins are [41,46) [46,51) ... [66,71].
//   S3  jumping window of 200, tolerance 1.5 % (3 executions), eight bins of
//       4/10/16/20/20/16/10/4 % over [36,41) ... [71,76].
// Each system has its own GPIO stream.  A window's latencies are drawn bin
// by bin from a target histogram and shuffled, so the expected histogram is
// known.  S1 runs 102 exact executions, one that is a cycle too slow and two
// exact ones: outcomes 1,1,1,0,0,0 and verdicts 1,1,0,0.  S2 and S3 run an
// exact window, one that deviates by the tolerance (still compliant) and one
// that deviates by one more (not compliant).  Checked: every outcome, every
// jumping-window histogram and the final verdicts.
module tb_stmo_workloads;
  localparam logic [1:0][63:0]  E1 = {64'd5465, 64'd5465};
  localparam logic [6:0][63:0]  E2 = {64'd71, 64'd66, 64'd61, 64'd56, 64'd51, 64'd46, 64'd41};
  localparam logic [8:0][63:0]  E3 = {64'd76, 64'd71, 64'd66, 64'd61, 64'd56, 64'd51, 64'd46, 64'd41, 64'd36};
  localparam logic [0:0][15:0]  C1 = {16'd100};
  localparam logic [5:0][15:0]  C2 = {16'd16, 16'd16, 16'd17, 16'd17, 16'd17, 16'd17};
  localparam logic [7:0][15:0]  C3 = {16'd8, 16'd20, 16'd32, 16'd40, 16'd40, 16'd32, 16'd20, 16'd8};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] g1 = '0, g2 = '0, g3 = '0;
  logic v1, v2, v3, o1, o2, o3, ov1, ov2, ov3;
  logic [0:0][15:0] bc1;
  logic [5:0][15:0] bc2;
  logic [7:0][15:0] bc3;

  stmo_system #(.WINDOW (100), .NUM_BINS (1), .BIN_EDGES (E1), .SPEC_COUNTS (C1), .TOLERANCE (0),
                .WIN_TYPE (stmo_pkg::WIN_SLIDING), .NUM_EXP (4), .EXPECTED (4'b0011)) u_s1 (
    .clk, .rst_n, .gpio_in (g1), .alarm_clear (1'b0), .log_rd_idx ('0),
    .verdict (v1), .verdict_valid (), .outcome (o1), .outcome_valid (ov1), .processing (),
    .alarm (), .irq (), .fail_count (), .bin_counts (bc1), .out_of_range (), .n_meas (), .bin_ok (),
    .win_fill (), .dropped (), .log_rd_data (), .log_count (), .log_total (),
    .equiv_done (), .equiv_ok (), .equiv_mismatches (), .equiv_compared (), .equiv_first_bad (),
    .obs_ev (), .obs_time (), .obs_valid (), .global_time (), .link_txd (), .link_errors ());
  stmo_system #(.WINDOW (100), .NUM_BINS (6), .BIN_EDGES (E2), .SPEC_COUNTS (C2), .TOLERANCE (5),
                .WIN_TYPE (stmo_pkg::WIN_JUMPING)) u_s2 (
    .clk, .rst_n, .gpio_in (g2), .alarm_clear (1'b0), .log_rd_idx ('0),
    .verdict (v2), .verdict_valid (), .outcome (o2), .outcome_valid (ov2), .processing (),
    .alarm (), .irq (), .fail_count (), .bin_counts (bc2), .out_of_range (), .n_meas (), .bin_ok (),
    .win_fill (), .dropped (), .log_rd_data (), .log_count (), .log_total (),
    .equiv_done (), .equiv_ok (), .equiv_mismatches (), .equiv_compared (), .equiv_first_bad (),
    .obs_ev (), .obs_time (), .obs_valid (), .global_time (), .link_txd (), .link_errors ());
  stmo_system #(.WINDOW (200), .NUM_BINS (8), .BIN_EDGES (E3), .SPEC_COUNTS (C3), .TOLERANCE (3),
                .WIN_TYPE (stmo_pkg::WIN_JUMPING)) u_s3 (
    .clk, .rst_n, .gpio_in (g3), .alarm_clear (1'b0), .log_rd_idx ('0),
    .verdict (v3), .verdict_valid (), .outcome (o3), .outcome_valid (ov3), .processing (),
    .alarm (), .irq (), .fail_count (), .bin_counts (bc3), .out_of_range (), .n_meas (), .bin_ok (),
    .win_fill (), .dropped (), .log_rd_data (), .log_count (), .log_total (),
    .equiv_done (), .equiv_ok (), .equiv_mismatches (), .equiv_compared (), .equiv_first_bad (),
    .obs_ev (), .obs_time (), .obs_valid (), .global_time (), .link_txd (), .link_errors ());

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latencies of one window: cnt[b] executions in bin b, shuffled
  function automatic void make_window(ref int lat [$], input int cnt [], input int edges []);
    int q [$];
    for (int b = 0; b < cnt.size(); b++)
      for (int k = 0; k < cnt[b]; k++)
        q.push_back(edges[b] + $urandom_range(edges[b+1] - edges[b] - 1));
    for (int i = q.size() - 1; i > 0; i--) begin
      int j = $urandom_range(i);
      int t = q[i]; q[i] = q[j]; q[j] = t;
    end
    lat = q;
  endfunction

  // observed outcomes and histograms
  bit out1 [$], out2 [$], out3 [$];
  int hist2 [$][6], hist3 [$][8];
  always @(posedge clk) if (rst_n) begin
    if (ov1) out1.push_back(o1);
    if (ov2) begin
      int h [6];
      out2.push_back(o2);
      foreach (h[b]) h[b] = int'(bc2[b]);
      hist2.push_back(h);
    end
    if (ov3) begin
      int h [8];
      out3.push_back(o3);
      foreach (h[b]) h[b] = int'(bc3[b]);
      hist3.push_back(h);
    end
  end

  // targets: exact, within tolerance, one beyond
  int t2 [3][6] = '{'{17, 17, 17, 17, 16, 16}, '{22, 12, 17, 17, 16, 16}, '{23, 11, 17, 17, 16, 16}};
  int t3 [3][8] = '{'{8, 20, 32, 40, 40, 32, 20, 8}, '{8, 23, 29, 40, 40, 32, 20, 8}, '{8, 20, 32, 44, 36, 32, 20, 8}};
  bit d1 = 0, d2 = 0, d3 = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    fork
      begin : drive_s1
        for (int k = 0; k < 105; k++) begin
          g1 <= 8'h01;
          repeat ((k == 102) ? 5466 : 5465) @(posedge clk);
          g1 <= 8'h02;
          repeat (30) @(posedge clk);
        end
        d1 = 1;
      end
      begin : drive_s2
        int e [] = '{41, 46, 51, 56, 61, 66, 71};
        for (int w = 0; w < 3; w++) begin
          int lat [$];
          int c [] = new [6];
          foreach (c[b]) c[b] = t2[w][b];
          make_window(lat, c, e);
          foreach (lat[i]) begin
            g2 <= 8'h01;
            repeat (lat[i]) @(posedge clk);
            g2 <= 8'h02;
            repeat (10 + $urandom_range(20)) @(posedge clk);
          end
        end
        d2 = 1;
      end
      begin : drive_s3
        int e [] = '{36, 41, 46, 51, 56, 61, 66, 71, 76};
        for (int w = 0; w < 3; w++) begin
          int lat [$];
          int c [] = new [8];
          foreach (c[b]) c[b] = t3[w][b];
          make_window(lat, c, e);
          foreach (lat[i]) begin
            g3 <= 8'h01;
            repeat (lat[i]) @(posedge clk);
            g3 <= 8'h02;
            repeat (10 + $urandom_range(20)) @(posedge clk);
          end
        end
        d3 = 1;
      end
    join
    repeat (1000) @(posedge clk);

    // S1: windows end at executions 100..105
    checks++;
    if (out1.size() != 6) begin failures++; $display("S1: %0d outcomes", out1.size()); end
    else foreach (out1[k]) begin
      checks++;
      if (out1[k] != (k < 3)) begin failures++; $display("S1 outcome %0d", k); end
    end
    checks++;
    if (v1 != 1'b0 || !u_s1.equiv_ok) failures++;

    // S2 and S3: one outcome per window, histogram equal to the target
    checks += 2;
    if (out2.size() != 3) begin failures++; $display("S2: %0d outcomes", out2.size()); end
    if (out3.size() != 3) begin failures++; $display("S3: %0d outcomes", out3.size()); end
    for (int w = 0; w < 3 && w < out2.size(); w++) begin
      checks++;
      if (out2[w] != (w < 2)) begin failures++; $display("S2 outcome %0d", w); end
      for (int b = 0; b < 6; b++) begin
        checks++;
        if (hist2[w][b] != t2[w][b]) begin failures++; $display("S2 window %0d bin %0d: %0d", w, b, hist2[w][b]); end
      end
    end
    for (int w = 0; w < 3 && w < out3.size(); w++) begin
      checks++;
      if (out3[w] != (w < 2)) begin failures++; $display("S3 outcome %0d", w); end
      for (int b = 0; b < 8; b++) begin
        checks++;
        if (hist3[w][b] != t3[w][b]) begin failures++; $display("S3 window %0d bin %0d: %0d", w, b, hist3[w][b]); end
      end
    end
    // 2-of-3 over (1,1,0)
    checks += 2;
    if (v2 != 1'b1) failures++;
    if (v3 != 1'b1) failures++;
    $display("S1 outcomes %p, S2 %p, S3 %p", out1, out2, out3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
