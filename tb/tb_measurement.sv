// tb_measurement: presents random sorted arrays and checks the histogram
// against one computed here, for the reaction and the repetitive pattern,
// including latencies outside every bin and on the closed last edge.  Also
// checks the time from is_sorted to asses.
//
// Origin: the stimulus, the expected values and the sizes used here are this
// testbench's own; the rules it checks are those of the design as described
// in its module header.
module tb_measurement;
  localparam int W = 12;
  localparam int NB = 3;
  localparam logic [NB:0][63:0] EDGES = {64'd400, 64'd300, 64'd200, 64'd100};
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0][63:0] sa, so;
  logic is_sorted;
  logic [NB-1:0][15:0] bc_a, bc_p;
  logic [15:0] oor_a, oor_p, nm_a, nm_p;
  logic asses_a, asses_p, busy_a, busy_p;
  int checks = 0, failures = 0;

  measurement #(.WINDOW (W), .NUM_BINS (NB), .PATTERN (stmo_pkg::PAT_REACTION), .BIN_EDGES (EDGES)) u_a (
    .clk, .rst_n, .start_sorted (sa), .stop_sorted (so), .is_sorted,
    .bin_counts (bc_a), .out_of_range (oor_a), .n_meas (nm_a), .asses (asses_a), .busy (busy_a));
  measurement #(.WINDOW (W), .NUM_BINS (NB), .PATTERN (stmo_pkg::PAT_REPETITIVE), .BIN_EDGES (EDGES)) u_p (
    .clk, .rst_n, .start_sorted (sa), .stop_sorted (so), .is_sorted,
    .bin_counts (bc_p), .out_of_range (oor_p), .n_meas (nm_p), .asses (asses_p), .busy (busy_p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bin_of(longint lat);
    for (int b = 0; b < NB; b++)
      if (lat >= longint'(EDGES[b]) && (lat < longint'(EDGES[b+1]) || (b == NB-1 && lat == longint'(EDGES[b+1]))))
        return b;
    return -1;
  endfunction

  initial begin
    int ref_a [NB+1];
    int ref_p [NB+1];
    int t_a, t_p;
    is_sorted = 0; sa = '0; so = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int round = 0; round < 200; round++) begin
      longint t;
      ref_a = '{default: 0};
      ref_p = '{default: 0};
      t = 1000;
      for (int i = 0; i < W; i++) begin
        longint lat;
        case ($urandom_range(5))
          0: lat = 400;                        // closed upper edge of the last bin
          1: lat = 50 + $urandom_range(40);    // below every bin
          2: lat = 401 + $urandom_range(50);   // above every bin
          default: lat = 100 + $urandom_range(299);
        endcase
        sa[i] = 64'(t);
        so[i] = 64'(t + lat);
        t += 30 + $urandom_range(420);
      end
      for (int i = 0; i < W; i++) begin
        int b;
        b = bin_of(longint'(so[i]) - longint'(sa[i]));
        ref_a[b < 0 ? NB : b]++;
        if (i > 0) begin
          b = bin_of(longint'(sa[i]) - longint'(sa[i-1]));
          ref_p[b < 0 ? NB : b]++;
        end
      end
      is_sorted <= 1'b1;
      @(posedge clk);
      is_sorted <= 1'b0;
      t_a = -1; t_p = -1;
      for (int c = 1; c <= W + 3; c++) begin
        @(posedge clk); #1;
        if (asses_a) t_a = c;
        if (asses_p) t_p = c;
      end
      checks += 2;
      if (t_a != W) begin failures++; $display("reaction asses after %0d", t_a); end
      if (t_p != W - 1) begin failures++; $display("repetitive asses after %0d", t_p); end
      for (int b = 0; b < NB; b++) begin
        checks += 2;
        if (bc_a[b] != 16'(ref_a[b])) begin failures++; $display("round %0d reaction bin %0d: %0d vs %0d", round, b, bc_a[b], ref_a[b]); end
        if (bc_p[b] != 16'(ref_p[b])) begin failures++; $display("round %0d repetitive bin %0d: %0d vs %0d", round, b, bc_p[b], ref_p[b]); end
      end
      checks += 4;
      if (oor_a != 16'(ref_a[NB])) failures++;
      if (oor_p != 16'(ref_p[NB])) failures++;
      if (nm_a != 16'(W)) failures++;
      if (nm_p != 16'(W - 1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
