// stmo_system: execution-time monitoring of firmware through a GPIO port.
//
// The firmware is annotated to write event codes to a GPIO port at the
// points of interest (for example 0x01 before and 0x02 after the code whose
// execution time is monitored).  The observer turns each change of the port
// into an event stamped with the global time.  The observer-monitor link
// carries the timed events to the Statistic Timing Monitor (STMo), which
// gathers a window of them, computes the latencies, builds their histogram,
// compares it with the specified histogram and gives a 2-of-3 majority
// verdict.  A run-time equivalence checker compares the verdicts with the
// sequence a design-time simulation produced (EXPECTED).
//
// Configuration (values of the reference configuration as defaults):
//   COMM_OB_MO  1 = direct wires between observer and monitor (default),
//               3 = serial link (uart_event_tx -> uart_event_rx, 8N1, BAUD)
//   FILT_OBS    event filter in the observer (default 0)
//   FILT_MON    event filter in the monitor (default 1)
// The observer takes the GPIO port directly (the GPIO protocol of the
// reference configuration); the specification parameters are passed to the
// monitor unchanged.
//
// Interface: gpio_in is the processor's event port, alarm_clear and
// log_rd_idx come from software; the outputs are the monitor's results,
// the equivalence-check status, the observer's timed events and, for the
// serial link, the line itself (link_txd, constant 1 with direct wires).
// In the default configuration 33 output bits are constant by design:
// link_txd and link_errors (no serial link) and dropped (a sliding window
// never refuses an event; only a full jumping window does).
// Timing: time is counted in clock cycles; a GPIO change is stamped with the
// timer value one cycle after it is sampled.
//
// Origin: observer and monitor connected behind the processor's GPIO port,
// direct wires or a serial link, filter placement and the run-time
// equivalence check follow the reference system; the processor, its GPIO
// peripheral and the board logic around them are not part of this design.
module stmo_system #(
  parameter int unsigned EVENT_W    = stmo_pkg::EVENT_W,
  parameter int unsigned TIME_W     = stmo_pkg::TIME_W,
  parameter int unsigned COMM_OB_MO = 1,
  parameter bit          FILT_OBS   = 1'b0,
  parameter bit          FILT_MON   = 1'b1,
  parameter int unsigned CLK_FREQ   = 50_000_000,
  parameter int unsigned BAUD       = 115_200,
  parameter int unsigned WINDOW     = stmo_pkg::DEF_WINDOW,
  parameter int unsigned NUM_BINS   = stmo_pkg::DEF_NUM_BINS,
  parameter int unsigned CNT_W      = 16,
  parameter stmo_pkg::pattern_e PATTERN  = stmo_pkg::DEF_PATTERN,
  parameter stmo_pkg::window_e  WIN_TYPE = stmo_pkg::DEF_WIN_TYPE,
  parameter logic [EVENT_W-1:0] START_EV = stmo_pkg::DEF_START_EV,
  parameter logic [EVENT_W-1:0] STOP_EV  = stmo_pkg::DEF_STOP_EV,
  parameter logic [NUM_BINS:0][TIME_W-1:0]  BIN_EDGES   = stmo_pkg::DEF_BIN_EDGES,
  parameter logic [NUM_BINS-1:0][CNT_W-1:0] SPEC_COUNTS = stmo_pkg::DEF_SPEC_COUNTS,
  parameter int unsigned TOLERANCE  = stmo_pkg::DEF_TOLERANCE,
  parameter int unsigned LOG_DEPTH  = 16,
  parameter int unsigned NUM_EXP    = 8,
  parameter logic [NUM_EXP-1:0] EXPECTED = '1,
  localparam int unsigned PW  = $clog2(WINDOW + 1),
  localparam int unsigned LAW = (LOG_DEPTH > 1) ? $clog2(LOG_DEPTH) : 1,
  localparam int unsigned EW  = $clog2(NUM_EXP + 1)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [EVENT_W-1:0]             gpio_in,
  input  logic                           alarm_clear,
  input  logic [LAW-1:0]                 log_rd_idx,
  // monitor results
  output logic                           verdict,
  output logic                           verdict_valid,
  output logic                           outcome,
  output logic                           outcome_valid,
  output logic                           processing,
  output logic                           alarm,
  output logic                           irq,
  output logic [CNT_W-1:0]               fail_count,
  output logic [NUM_BINS-1:0][CNT_W-1:0] bin_counts,
  output logic [CNT_W-1:0]               out_of_range,
  output logic [CNT_W-1:0]               n_meas,
  output logic [NUM_BINS-1:0]            bin_ok,
  output logic [PW-1:0]                  win_fill,
  output logic [15:0]                    dropped,
  output logic [TIME_W+17:0]             log_rd_data,
  output logic [LAW:0]                   log_count,
  output logic [31:0]                    log_total,
  // run-time equivalence check
  output logic                           equiv_done,
  output logic                           equiv_ok,
  output logic [EW-1:0]                  equiv_mismatches,
  output logic [EW-1:0]                  equiv_compared,
  output logic [EW-1:0]                  equiv_first_bad,
  // observer side
  output logic [EVENT_W-1:0]             obs_ev,
  output logic [TIME_W-1:0]              obs_time,
  output logic                           obs_valid,
  output logic [TIME_W-1:0]              global_time,
  output logic                           link_txd,
  output logic [15:0]                    link_errors
);

  // -------------------------------------------------------------- observer
  observer #(
    .EVENT_W (EVENT_W), .TIME_W (TIME_W), .FILT_OBS (FILT_OBS),
    .NUM_EV (2), .EV_LIST ({STOP_EV, START_EV})
  ) u_observer (
    .clk, .rst_n,
    .gpio_in,
    .out_ev    (obs_ev),
    .out_time  (obs_time),
    .out_valid (obs_valid),
    .now       (global_time)
  );

  // ------------------------------------------------ observer-monitor link
  logic [EVENT_W-1:0] mon_ev;
  logic [TIME_W-1:0]  mon_time;
  logic               mon_valid;

  if (COMM_OB_MO == 3) begin : g_uart
    logic        tx_busy;
    logic [15:0] tx_overflow, rx_ferr;

    uart_event_tx #(
      .EVENT_W (EVENT_W), .TIME_W (TIME_W), .CLK_FREQ (CLK_FREQ), .BAUD (BAUD)
    ) u_tx (
      .clk, .rst_n,
      .ev (obs_ev), .time_in (obs_time), .valid (obs_valid),
      .txd (link_txd), .busy (tx_busy), .overflow (tx_overflow)
    );

    uart_event_rx #(
      .EVENT_W (EVENT_W), .TIME_W (TIME_W), .CLK_FREQ (CLK_FREQ), .BAUD (BAUD)
    ) u_rx (
      .clk, .rst_n,
      .rxd (link_txd),
      .ev (mon_ev), .time_out (mon_time), .valid (mon_valid),
      .frame_errors (rx_ferr)
    );

    assign link_errors = tx_overflow + rx_ferr;
  end else begin : g_wires
    assign mon_ev      = obs_ev;
    assign mon_time    = obs_time;
    assign mon_valid   = obs_valid;
    assign link_txd    = 1'b1;
    assign link_errors = '0;
  end

  // --------------------------------------------------------------- monitor
  logic                verdict_strobe;

  stmo_monitor #(
    .EVENT_W (EVENT_W), .TIME_W (TIME_W), .FILT_MON (FILT_MON),
    .WINDOW (WINDOW), .NUM_BINS (NUM_BINS), .CNT_W (CNT_W),
    .PATTERN (PATTERN), .WIN_TYPE (WIN_TYPE),
    .START_EV (START_EV), .STOP_EV (STOP_EV),
    .BIN_EDGES (BIN_EDGES), .SPEC_COUNTS (SPEC_COUNTS),
    .TOLERANCE (TOLERANCE), .LOG_DEPTH (LOG_DEPTH)
  ) u_monitor (
    .clk, .rst_n,
    .in_ev (mon_ev), .in_time (mon_time), .in_valid (mon_valid),
    .alarm_clear, .log_rd_idx,
    .verdict, .verdict_valid, .verdict_strobe,
    .outcome, .outcome_valid, .processing,
    .alarm, .irq, .fail_count,
    .bin_counts, .out_of_range, .n_meas, .win_fill, .dropped,
    .log_rd_data, .log_count, .log_total, .bin_ok
  );

  // ------------------------------------------- run-time equivalence check
  sim_result_checker #(.NUM_EXP (NUM_EXP), .EXPECTED (EXPECTED)) u_equiv (
    .clk, .rst_n,
    .result       (verdict),
    .result_valid (verdict_strobe),
    .compared     (equiv_compared),
    .mismatches   (equiv_mismatches),
    .first_bad    (equiv_first_bad),
    .done         (equiv_done),
    .equivalent   (equiv_ok)
  );

endmodule
