// tb_stmo_system: end-to-end test of the monitoring system at reduced size.
//
// A firmware model writes 0x01, waits the execution time of the monitored
// code, writes 0x02 and then writes an unrelated code 0x04.  Four systems
// watch the same GPIO port (WINDOW 6, bins [20,40) [40,60) [60,80] cycles,
// two measurements per bin, tolerance 0):
//   A  reference configuration: direct wires, filter in the monitor,
//      sliding window, recorded results match
//   B  serial observer-monitor link, filter in the observer
//   C  as A, but the recorded results differ in two places
//   D  as A with a jumping window
// Twelve compliant executions (bins 0,1,2,...) are followed by six with the
// wrong distribution, one of them faster than every bin.  The expected
// outcomes and verdicts are computed here from the latencies written.  Every
// mechanism of the design is counted and must occur: sliding and jumping
// windows, positive and negative outcomes, a negative outcome outvoted by
// the majority, a negative verdict with alarm and interrupt, alarm clear,
// out-of-range latency, serial transfer, filtering in the observer,
// equivalence pass and equivalence mismatch.
//
// Origin: the stimulus, the expected values and the sizes used here are this
// testbench's own; the rules it checks are those of the design as described
// in its module header.
module tb_stmo_system;
  localparam int W  = 6;
  localparam int NB = 3;
  localparam logic [NB:0][63:0]   EDGES = {64'd80, 64'd60, 64'd40, 64'd20};
  localparam logic [NB-1:0][15:0] SPEC  = {16'd2, 16'd2, 16'd2};
  localparam logic [7:0] EXP_OK  = 8'b0011_1111;   // the verdicts this stream gives
  localparam logic [7:0] EXP_BAD = 8'b1111_1111;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] gpio;
  logic       clr;

  // outputs of the four systems, indexed A=0 .. D=3
  logic        verdict [4], vvalid [4], outcome [4], ovalid [4], processing [4];
  logic        alarm [4], irq [4];
  logic [15:0] fails [4], oor [4], nmeas [4], dropped [4], lerr [4];
  logic [NB-1:0][15:0] bc [4];
  logic [NB-1:0] bok [4];
  logic [2:0]  fill [4];
  logic [81:0] ldata [4];
  logic [4:0]  lcount [4];
  logic [31:0] ltotal [4];
  logic        eq_done [4], eq_ok [4];
  logic [3:0]  eq_mis [4], eq_cmp [4], eq_fb [4];
  logic [7:0]  oev [4];
  logic [63:0] otime [4], gtime [4];
  logic        ovld [4], txd [4];

  `define STMO_PORTS(i) \
    .clk, .rst_n, .gpio_in (gpio), .alarm_clear (clr), .log_rd_idx (4'd0), \
    .verdict (verdict[i]), .verdict_valid (vvalid[i]), .outcome (outcome[i]), .outcome_valid (ovalid[i]), \
    .processing (processing[i]), .alarm (alarm[i]), .irq (irq[i]), .fail_count (fails[i]), \
    .bin_counts (bc[i]), .out_of_range (oor[i]), .n_meas (nmeas[i]), .bin_ok (bok[i]), \
    .win_fill (fill[i]), .dropped (dropped[i]), .log_rd_data (ldata[i]), .log_count (lcount[i]), \
    .log_total (ltotal[i]), .equiv_done (eq_done[i]), .equiv_ok (eq_ok[i]), .equiv_mismatches (eq_mis[i]), \
    .equiv_compared (eq_cmp[i]), .equiv_first_bad (eq_fb[i]), .obs_ev (oev[i]), .obs_time (otime[i]), \
    .obs_valid (ovld[i]), .global_time (gtime[i]), .link_txd (txd[i]), .link_errors (lerr[i])

  stmo_system #(.WINDOW (W), .NUM_BINS (NB), .BIN_EDGES (EDGES), .SPEC_COUNTS (SPEC),
                .EXPECTED (EXP_OK)) u_a (`STMO_PORTS(0));
  stmo_system #(.WINDOW (W), .NUM_BINS (NB), .BIN_EDGES (EDGES), .SPEC_COUNTS (SPEC),
                .EXPECTED (EXP_OK), .COMM_OB_MO (3), .FILT_OBS (1'b1), .FILT_MON (1'b0),
                .CLK_FREQ (1_000_000), .BAUD (250_000)) u_b (`STMO_PORTS(1));
  stmo_system #(.WINDOW (W), .NUM_BINS (NB), .BIN_EDGES (EDGES), .SPEC_COUNTS (SPEC),
                .EXPECTED (EXP_BAD)) u_c (`STMO_PORTS(2));
  stmo_system #(.WINDOW (W), .NUM_BINS (NB), .BIN_EDGES (EDGES), .SPEC_COUNTS (SPEC),
                .EXPECTED (EXP_OK), .WIN_TYPE (stmo_pkg::WIN_JUMPING)) u_d (`STMO_PORTS(3));

  `undef STMO_PORTS

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- reference model
  int  lats [$];
  bit  exp_slide [$];
  bit  exp_jump [$];

  function automatic bit hist_ok(int first);
    int cnt [NB];
    cnt = '{default: 0};
    for (int i = first; i < first + W; i++)
      for (int b = 0; b < NB; b++)
        if (lats[i] >= int'(EDGES[b]) && (lats[i] < int'(EDGES[b+1]) ||
            (b == NB-1 && lats[i] == int'(EDGES[b+1])))) cnt[b]++;
    for (int b = 0; b < NB; b++) if (cnt[b] != int'(SPEC[b])) return 1'b0;
    return 1'b1;
  endfunction

  // ---------------------------------------------------- observed behaviour
  bit outs [4][$];
  bit verds [4][$];
  int n_irq [4];
  int n_obs4 [4];
  int n_outvoted = 0;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) begin
      if (ovalid[i]) outs[i].push_back(outcome[i]);
      if (u_vs(i)) begin
        verds[i].push_back(verdict[i]);
        if (verdict[i] && outs[i][outs[i].size()-1] == 1'b0) n_outvoted++;
      end
      if (irq[i]) n_irq[i]++;
      if (ovld[i] && oev[i] == 8'h04) n_obs4[i]++;
    end
  end

  // verdict strobe: a new verdict is visible one cycle after an outcome once
  // three outcomes exist; taken from the monitor's port inside each system
  function automatic bit u_vs(int i);
    case (i)
      0: return u_a.verdict_strobe;
      1: return u_b.verdict_strobe;
      2: return u_c.verdict_strobe;
      default: return u_d.verdict_strobe;
    endcase
  endfunction

  // ------------------------------------------------------- firmware model
  task automatic execute(int lat);
    gpio <= 8'h01;
    repeat (lat) @(posedge clk);
    gpio <= 8'h02;
    repeat (20) @(posedge clk);
    gpio <= 8'h04;                 // unrelated annotation
    repeat (1500) @(posedge clk);
    lats.push_back(lat);
    if (lats.size() >= W) exp_slide.push_back(hist_ok(lats.size() - W));
    if (lats.size() % W == 0) exp_jump.push_back(hist_ok(lats.size() - W));
  endtask

  initial begin
    gpio = 0; clr = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 12; k++)
      execute((k % 3 == 0) ? 20 + $urandom_range(19) : (k % 3 == 1) ? 40 + $urandom_range(19) : 60 + $urandom_range(20));
    for (int k = 0; k < 6; k++)
      execute((k == 3) ? 10 : 50);
    repeat (2000) @(posedge clk);

    // outcomes of every system against the model
    for (int i = 0; i < 4; i++) begin
      bit e [$];
      e = (i == 3) ? exp_jump : exp_slide;
      checks++;
      if (outs[i].size() != e.size()) begin
        failures++; $display("system %0d: %0d outcomes, expected %0d", i, outs[i].size(), e.size());
      end else
        for (int k = 0; k < e.size(); k++) begin
          checks++;
          if (outs[i][k] != e[k]) begin failures++; $display("system %0d outcome %0d", i, k); end
        end
      for (int k = 2; k < outs[i].size(); k++) begin
        checks++;
        if (verds[i][k-2] != ((int'(outs[i][k]) + int'(outs[i][k-1]) + int'(outs[i][k-2])) >= 2)) begin
          failures++; $display("system %0d verdict %0d", i, k - 2);
        end
      end
    end
    // recorded results: the model's verdicts must be what EXP_OK holds
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (verds[0][k] != EXP_OK[k]) begin failures++; $display("EXP_OK bit %0d does not match", k); end
    end

    // mechanisms
    checks += 14;
    if (outs[0].size() != 18 - W + 1) failures++;            // sliding: one outcome per execution
    if (outs[3].size() != 3) failures++;                     // jumping: one per six executions
    if (!eq_done[0] || !eq_ok[0] || !eq_ok[1]) failures++;   // equivalence holds
    if (eq_ok[2] || eq_mis[2] != 2 || eq_fb[2] != 6) failures++;  // and detects a difference
    if (n_outvoted == 0) failures++;                         // 2-of-3 majority masks one bad window
    if (verdict[0] || !alarm[0] || n_irq[0] != 1) failures++;
    if (oor[0] != 1 || oor[1] != 1) failures++;              // out-of-range latency
    if (n_obs4[0] != 18) failures++;                         // A passes 0x04 on to the monitor
    if (n_obs4[1] != 0) failures++;                          // B filters it in the observer
    if (lerr[1] != 0 || txd[0] != 1'b1) failures++;          // serial link clean
    if (bc[0][1] != 5 || bc[0][0] != 0 || bc[0][2] != 0) failures++;
    if (verdict[3] != 1'b1) failures++;                      // jumping: outcomes 1,1,0 -> verdict 1
    if (dropped[0] != 0) failures++;
    if (processing[0]) failures++;

    clr <= 1'b1; @(posedge clk); clr <= 1'b0; @(posedge clk); #1;
    checks++;
    if (alarm[0]) failures++;
    $display("outcomes A:%0d B:%0d C:%0d D:%0d, outvoted %0d, A irq %0d, C mismatches %0d",
             outs[0].size(), outs[1].size(), outs[2].size(), outs[3].size(), n_outvoted, n_irq[0], eq_mis[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
