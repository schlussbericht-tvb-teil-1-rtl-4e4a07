// stmo_monitor: the Statistic Timing Monitor.
//
// Receives time-stamped events from the observer and decides whether the
// execution-time statistics of the firmware match the specification:
//   [event_filter]      only when FILT_MON is 1 (the default placement)
//   event_synchronizer  collects a window of start/stop time stamps, sorts them
//   measurement         latencies and their histogram
//   assessment          histogram vs. specified histogram within TOLERANCE
//   verdict_unit        2-of-3 majority over the last window outcomes
//   alert_escalation    sticky alarm, interrupt pulse, violation count
//   event_logger        one record per assessed window for back-tracing
// The specification (pattern, window type and length, events, bin edges,
// expected counts, tolerance) is given by parameters, as a design flow would
// set them per property.  The default is the three-bin reaction property of
// stmo_pkg.
//
// Interface: in_ev/in_time/in_valid (timed events), alarm_clear, log_rd_idx;
// verdict/verdict_valid/verdict_strobe, outcome/outcome_valid (per window),
// processing (a window is being sorted, measured or assessed), alarm/irq/
// fail_count, bin_counts/out_of_range/n_meas (last histogram), bin_ok (bins within tolerance), win_fill
// (measurements in the open window), dropped, and the log port (log_rd_idx/log_rd_data/log_count/log_total).  A log
// record is {time of the newest event [81:18], window number [17:2],
// outcome [1], verdict [0]}.
// Timing: outcome_valid rises 2*WINDOW + 4 clock cycles after the edge that
// samples the event completing a window (filter 1, synchronizer 1, copy 1,
// sort WINDOW, measurement WINDOW, assessment 1; one less without the
// filter); the verdict follows one cycle later.
//
// Origin: the stage order synchronizer, measurement, assessment, verdict
// follows the reference monitor, as do the filter placement switch and the
// processing flag; alerting and logging are named there but built here in a
// simple form of this design's own.
module stmo_monitor #(
  parameter int unsigned EVENT_W   = stmo_pkg::EVENT_W,
  parameter int unsigned TIME_W    = stmo_pkg::TIME_W,
  parameter bit          FILT_MON  = 1'b1,
  parameter int unsigned WINDOW    = stmo_pkg::DEF_WINDOW,
  parameter int unsigned NUM_BINS  = stmo_pkg::DEF_NUM_BINS,
  parameter int unsigned CNT_W     = 16,
  parameter stmo_pkg::pattern_e PATTERN  = stmo_pkg::DEF_PATTERN,
  parameter stmo_pkg::window_e  WIN_TYPE = stmo_pkg::DEF_WIN_TYPE,
  parameter logic [EVENT_W-1:0] START_EV = stmo_pkg::DEF_START_EV,
  parameter logic [EVENT_W-1:0] STOP_EV  = stmo_pkg::DEF_STOP_EV,
  parameter logic [NUM_BINS:0][TIME_W-1:0]  BIN_EDGES   = stmo_pkg::DEF_BIN_EDGES,
  parameter logic [NUM_BINS-1:0][CNT_W-1:0] SPEC_COUNTS = stmo_pkg::DEF_SPEC_COUNTS,
  parameter int unsigned TOLERANCE = stmo_pkg::DEF_TOLERANCE,
  parameter int unsigned LOG_DEPTH = 16,
  localparam int unsigned PW     = $clog2(WINDOW + 1),
  localparam int unsigned LAW    = (LOG_DEPTH > 1) ? $clog2(LOG_DEPTH) : 1,
  localparam int unsigned LOG_W  = TIME_W + 18
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [EVENT_W-1:0]             in_ev,
  input  logic [TIME_W-1:0]              in_time,
  input  logic                           in_valid,
  input  logic                           alarm_clear,
  input  logic [LAW-1:0]                 log_rd_idx,
  output logic                           verdict,
  output logic                           verdict_valid,
  output logic                           verdict_strobe,
  output logic                           outcome,
  output logic                           outcome_valid,
  output logic                           processing,
  output logic                           alarm,
  output logic                           irq,
  output logic [CNT_W-1:0]               fail_count,
  output logic [NUM_BINS-1:0][CNT_W-1:0] bin_counts,
  output logic [CNT_W-1:0]               out_of_range,
  output logic [CNT_W-1:0]               n_meas,
  output logic [PW-1:0]                  win_fill,
  output logic [15:0]                    dropped,
  output logic [LOG_W-1:0]               log_rd_data,
  output logic [LAW:0]                   log_count,
  output logic [31:0]                    log_total,
  output logic [NUM_BINS-1:0]            bin_ok
);

  // ---------------------------------------------------------------- filter
  logic [EVENT_W-1:0] f_ev;
  logic [TIME_W-1:0]  f_time;
  logic               f_valid;

  if (FILT_MON) begin : g_filter
    event_filter #(
      .EVENT_W (EVENT_W),
      .TAG_W   (TIME_W),
      .NUM_EV  (2),
      .EV_LIST ({STOP_EV, START_EV})
    ) u_filter (
      .clk, .rst_n,
      .ev_in            (in_ev),
      .tag_in           (in_time),
      .event_marker_in  (in_valid),
      .ev_out           (f_ev),
      .tag_out          (f_time),
      .event_marker_out (f_valid)
    );
  end else begin : g_no_filter
    assign f_ev    = in_ev;
    assign f_time  = in_time;
    assign f_valid = in_valid;
  end

  // ---------------------------------------------------------- synchronizer
  logic [WINDOW-1:0][TIME_W-1:0] start_sorted, stop_sorted;
  logic is_sorted, sorting, meas_busy, asses;

  event_synchronizer #(
    .EVENT_W (EVENT_W), .TIME_W (TIME_W), .WINDOW (WINDOW),
    .PATTERN (PATTERN), .WIN_TYPE (WIN_TYPE),
    .START_EV (START_EV), .STOP_EV (STOP_EV)
  ) u_sync (
    .clk, .rst_n,
    .in_ev (f_ev), .in_time (f_time), .in_valid (f_valid),
    .meas_busy,
    .start_sorted, .stop_sorted, .is_sorted, .sorting,
    .win_fill, .dropped
  );

  // ----------------------------------------------------------- measurement
  measurement #(
    .TIME_W (TIME_W), .WINDOW (WINDOW), .NUM_BINS (NUM_BINS), .CNT_W (CNT_W),
    .PATTERN (PATTERN), .BIN_EDGES (BIN_EDGES)
  ) u_meas (
    .clk, .rst_n,
    .start_sorted, .stop_sorted, .is_sorted,
    .bin_counts, .out_of_range, .n_meas,
    .asses, .busy (meas_busy)
  );

  // ------------------------------------------------------------ assessment
  assessment #(
    .NUM_BINS (NUM_BINS), .CNT_W (CNT_W),
    .SPEC_COUNTS (SPEC_COUNTS), .TOLERANCE (TOLERANCE)
  ) u_assess (
    .clk, .rst_n,
    .bin_counts, .asses,
    .outcome, .outcome_valid, .bin_ok
  );

  // --------------------------------------------------------------- verdict
  verdict_unit u_verdict (
    .clk, .rst_n,
    .outcome, .outcome_valid,
    .verdict, .verdict_valid, .verdict_strobe
  );

  // -------------------------------------------------------------- alerting
  alert_escalation #(.CNT_W (CNT_W)) u_alert (
    .clk, .rst_n,
    .verdict, .verdict_strobe, .alarm_clear,
    .alarm, .irq, .fail_count
  );

  // --------------------------------------------------------------- logging
  logic [TIME_W-1:0] last_time;
  logic [15:0]       win_no;
  logic              log_we;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_time <= '0;
      win_no    <= '0;
      log_we    <= 1'b0;
    end else begin
      if (f_valid) last_time <= f_time;
      log_we <= outcome_valid;            // one cycle later the verdict is current
      if (log_we) win_no <= win_no + 1'b1;
    end
  end

  event_logger #(.DATA_W (LOG_W), .DEPTH (LOG_DEPTH)) u_log (
    .clk, .rst_n,
    .we      (log_we),
    .wdata   ({last_time, win_no, outcome, verdict}),
    .rd_idx  (log_rd_idx),
    .rd_data (log_rd_data),
    .count   (log_count),
    .total   (log_total)
  );

  assign processing = sorting | is_sorted | meas_busy | asses | outcome_valid;

endmodule
