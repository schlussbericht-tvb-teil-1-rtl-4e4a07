// event_synchronizer: restores the temporal order of a window of events.
//
// Timed events may reach the monitor out of order when the observer-monitor
// link has a variable delay.  The synchronizer files the time stamp of every
// start event into a start buffer and of every stop event into a stop
// buffer (reaction pattern; with a repetitive pattern every incoming event
// goes to the start buffer).  When both buffers hold WINDOW entries, the
// buffers are copied into two sort arrays and sorted in ascending time; then
// is_sorted pulses and the sorted arrays stay unchanged until the next sort.
//
// Window types:
//   WIN_JUMPING - after each copy the buffers start empty, so every window
//                 consists of WINDOW fresh measurements.
//   WIN_SLIDING - the buffers are circular; once full, every new complete
//                 measurement (a new start in repetitive mode, a start/stop
//                 pair in reaction mode) triggers a new copy and sort over
//                 the latest WINDOW entries.
//
// Sorting is an odd-even transposition sort: in each of WINDOW cycles all
// neighbouring pairs of one parity are compared and swapped in parallel.
// This is a hardware-friendly replacement for the quick sort of the
// reference flow: it needs no stack, always takes WINDOW cycles and gives the
// same ascending order.
//
// Interface: in_ev/in_time/in_valid carry the timed events; meas_busy from
// the measurement unit holds back a new copy while the old arrays are still
// read.  start_sorted/stop_sorted are the sorted arrays, is_sorted the
// one-cycle "ready" strobe, sorting is high while a sort runs, win_fill is
// the number of entries in the start buffer and dropped counts events lost
// because a jumping window was full while the previous one was still used.
// Timing: the copy happens in the cycle after the completing event is
// accepted (or as soon as meas_busy falls), is_sorted follows WINDOW cycles later.
//
// Origin: two time-stamp arrays (start and stop; every event counts as a
// start for a repetitive pattern), sorting once a window is complete and the
// is_sorted flag follow the reference design, which uses quick sort; the odd-
// even transposition sort, the circular buffers, the balance rule for sliding
// reaction windows and the drop counter are this design's own.
module event_synchronizer #(
  parameter int unsigned EVENT_W  = stmo_pkg::EVENT_W,
  parameter int unsigned TIME_W   = stmo_pkg::TIME_W,
  parameter int unsigned WINDOW   = stmo_pkg::DEF_WINDOW,
  parameter stmo_pkg::pattern_e PATTERN  = stmo_pkg::DEF_PATTERN,
  parameter stmo_pkg::window_e  WIN_TYPE = stmo_pkg::DEF_WIN_TYPE,
  parameter logic [EVENT_W-1:0] START_EV = stmo_pkg::DEF_START_EV,
  parameter logic [EVENT_W-1:0] STOP_EV  = stmo_pkg::DEF_STOP_EV,
  localparam int unsigned PW = $clog2(WINDOW + 1)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [EVENT_W-1:0]             in_ev,
  input  logic [TIME_W-1:0]              in_time,
  input  logic                           in_valid,
  input  logic                           meas_busy,
  output logic [WINDOW-1:0][TIME_W-1:0]  start_sorted,
  output logic [WINDOW-1:0][TIME_W-1:0]  stop_sorted,
  output logic                           is_sorted,
  output logic                           sorting,
  output logic [PW-1:0]                  win_fill,
  output logic [15:0]                    dropped
);

  localparam bit REACT = (PATTERN == stmo_pkg::PAT_REACTION);
  localparam bit SLIDE = (WIN_TYPE == stmo_pkg::WIN_SLIDING);

  logic [TIME_W-1:0] start_buf [WINDOW];
  logic [TIME_W-1:0] stop_buf  [WINDOW];
  logic [PW-1:0]     start_cnt, stop_cnt;
  logic [PW-1:0]     start_wp,  stop_wp;
  logic signed [PW+1:0] balance;     // starts minus stops (sliding reaction windows)
  logic              fresh;          // something new since the last copy
  logic [PW-1:0]     phase;

  logic take_start, take_stop, full, trigger, copy;
  logic [WINDOW-1:0][TIME_W-1:0] start_nx, stop_nx;

  // Reaction: start and stop codes are told apart.  Repetitive: every event
  // is a start event.
  assign take_start = in_valid && (REACT ? (in_ev == START_EV) : 1'b1);
  assign take_stop  = in_valid && REACT && (in_ev == STOP_EV);

  assign full    = (start_cnt == PW'(WINDOW)) && (!REACT || stop_cnt == PW'(WINDOW));
  assign trigger = full && fresh && (!REACT || !SLIDE || balance == 0);
  assign copy    = trigger && !sorting && !meas_busy && !is_sorted;

  assign win_fill = start_cnt;

  // One phase of the odd-even transposition sort
  always_comb begin
    start_nx = start_sorted;
    stop_nx  = stop_sorted;
    for (int i = 0; i + 1 < WINDOW; i++) begin
      if ((i % 2) == int'(phase[0])) begin
        if (start_sorted[i] > start_sorted[i+1]) begin
          start_nx[i]   = start_sorted[i+1];
          start_nx[i+1] = start_sorted[i];
        end
        if (stop_sorted[i] > stop_sorted[i+1]) begin
          stop_nx[i]   = stop_sorted[i+1];
          stop_nx[i+1] = stop_sorted[i];
        end
      end
    end
  end

  // Buffers: plain arrays, written at one address per cycle
  always_ff @(posedge clk) begin
    if (take_start) start_buf[(copy && !SLIDE) ? '0 : start_wp] <= in_time;
    if (take_stop)  stop_buf [(copy && !SLIDE) ? '0 : stop_wp]  <= in_time;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      start_cnt <= '0;
      stop_cnt  <= '0;
      start_wp  <= '0;
      stop_wp   <= '0;
      balance   <= '0;
      fresh     <= 1'b0;
      sorting   <= 1'b0;
      is_sorted <= 1'b0;
      phase     <= '0;
      dropped   <= '0;
      start_sorted <= '0;
      stop_sorted  <= '0;
    end else begin
      is_sorted <= 1'b0;

      // ---- copy a complete window into the sort arrays
      if (copy) begin
        for (int i = 0; i < WINDOW; i++) begin
          start_sorted[i] <= start_buf[i];
          stop_sorted[i]  <= REACT ? stop_buf[i] : '0;
        end
        sorting <= 1'b1;
        phase   <= '0;
        fresh   <= 1'b0;
        if (!SLIDE) begin
          start_cnt <= '0;
          stop_cnt  <= '0;
          start_wp  <= '0;
          stop_wp   <= '0;
        end
      end else if (sorting) begin
        start_sorted <= start_nx;
        stop_sorted  <= stop_nx;
        if (phase == PW'(WINDOW - 1)) begin
          sorting   <= 1'b0;
          is_sorted <= 1'b1;
        end
        phase <= phase + 1'b1;
      end

      // ---- accept new events
      if (take_start) begin
        if (copy && !SLIDE) begin
          start_cnt <= PW'(1);
          start_wp  <= PW'(1 % WINDOW);
          fresh     <= 1'b1;
        end else if (SLIDE || start_cnt != PW'(WINDOW)) begin
          start_wp  <= (start_wp == PW'(WINDOW - 1)) ? '0 : start_wp + 1'b1;
          if (start_cnt != PW'(WINDOW)) start_cnt <= start_cnt + 1'b1;
          fresh     <= 1'b1;
        end else begin
          dropped   <= dropped + 1'b1;
        end
      end
      if (take_stop) begin
        if (copy && !SLIDE) begin
          stop_cnt <= PW'(1);
          stop_wp  <= PW'(1 % WINDOW);
          fresh    <= 1'b1;
        end else if (SLIDE || stop_cnt != PW'(WINDOW)) begin
          stop_wp  <= (stop_wp == PW'(WINDOW - 1)) ? '0 : stop_wp + 1'b1;
          if (stop_cnt != PW'(WINDOW)) stop_cnt <= stop_cnt + 1'b1;
          fresh    <= 1'b1;
        end else begin
          dropped  <= dropped + 1'b1;
        end
      end
      if (REACT && (take_start != take_stop))
        balance <= take_start ? balance + (PW+2)'(1) : balance - (PW+2)'(1);
    end
  end

  // A new window is only copied while nobody reads the sorted arrays
  a_no_copy_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    copy |-> !meas_busy && !sorting);

endmodule
