// measurement: turns a sorted window of time stamps into a latency histogram.
//
// When is_sorted pulses, the unit clears its bin counters and walks the
// sorted arrays one element per clock cycle:
//   reaction pattern   - latency[i] = stop_sorted[i] - start_sorted[i]
//                        (WINDOW latencies)
//   repetitive pattern - latency[i] = start_sorted[i] - start_sorted[i-1]
//                        (WINDOW-1 latencies)
// Each latency is compared with all bin edges at once and increments the
// counter of the bin it falls in: bin b holds [BIN_EDGES[b], BIN_EDGES[b+1]),
// and the last bin also holds its upper edge, so a bin whose two edges are
// equal matches one exact latency.  Latencies outside every bin are counted
// in out_of_range.  When the window is done, asses pulses for one cycle and
// bin_counts hold the histogram until the next window starts.
//
// Interface: start_sorted/stop_sorted/is_sorted from the synchronizer;
// bin_counts, out_of_range, n_meas (measurements in the histogram), asses
// and busy (high while the arrays are being read).
// Timing: asses rises WINDOW (reaction) or WINDOW-1 (repetitive) clock
// cycles after the edge that samples is_sorted.
//
// Origin: reaction latency from corresponding sorted start and stop stamps,
// repetitive latency from successive starts, binning against the
// specification's thresholds and the asses flag follow the reference design;
// the sign (stop minus start), the half-open bins, the out-of-range count and
// one latency per cycle are choices made here.
module measurement #(
  parameter int unsigned TIME_W   = stmo_pkg::TIME_W,
  parameter int unsigned WINDOW   = stmo_pkg::DEF_WINDOW,
  parameter int unsigned NUM_BINS = stmo_pkg::DEF_NUM_BINS,
  parameter int unsigned CNT_W    = 16,
  parameter stmo_pkg::pattern_e PATTERN = stmo_pkg::DEF_PATTERN,
  parameter logic [NUM_BINS:0][TIME_W-1:0] BIN_EDGES = stmo_pkg::DEF_BIN_EDGES,
  localparam int unsigned IW = $clog2(WINDOW + 1)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [WINDOW-1:0][TIME_W-1:0]  start_sorted,
  input  logic [WINDOW-1:0][TIME_W-1:0]  stop_sorted,
  input  logic                           is_sorted,
  output logic [NUM_BINS-1:0][CNT_W-1:0] bin_counts,
  output logic [CNT_W-1:0]               out_of_range,
  output logic [CNT_W-1:0]               n_meas,
  output logic                           asses,
  output logic                           busy
);

  localparam bit REACT = (PATTERN == stmo_pkg::PAT_REACTION);

  logic [IW-1:0]       idx;
  logic [TIME_W-1:0]   latency;
  logic [NUM_BINS-1:0] in_bin;

  always_comb begin
    if (REACT) latency = stop_sorted[idx] - start_sorted[idx];
    else       latency = start_sorted[idx] - start_sorted[(idx == '0) ? idx : idx - 1'b1];
    for (int b = 0; b < NUM_BINS; b++) begin
      in_bin[b] = (latency >= BIN_EDGES[b]) &&
                  ((latency < BIN_EDGES[b+1]) ||
                   ((b == NUM_BINS - 1) && (latency == BIN_EDGES[b+1])));
      // a latency matches at most one bin: the first one
      for (int c = 0; c < b; c++)
        if (in_bin[c]) in_bin[b] = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx          <= '0;
      busy         <= 1'b0;
      asses        <= 1'b0;
      bin_counts   <= '0;
      out_of_range <= '0;
      n_meas       <= '0;
    end else begin
      asses <= 1'b0;
      if (is_sorted && !busy) begin
        busy         <= 1'b1;
        idx          <= REACT ? IW'(0) : IW'(1);
        bin_counts   <= '0;
        out_of_range <= '0;
        n_meas       <= '0;
      end else if (busy) begin
        for (int b = 0; b < NUM_BINS; b++)
          if (in_bin[b]) bin_counts[b] <= bin_counts[b] + 1'b1;
        if (in_bin == '0) out_of_range <= out_of_range + 1'b1;
        n_meas <= n_meas + 1'b1;
        if (idx == IW'(WINDOW - 1)) begin
          busy  <= 1'b0;
          asses <= 1'b1;
        end
        idx <= idx + 1'b1;
      end
    end
  end

endmodule
