// observer: the probe side of the monitoring system.
//
// The firmware writes event codes to a GPIO port.  The observer turns every
// change of that port into an event (sensor_comparator), optionally drops
// events the specification does not name (event_filter, when FILT_OBS is 1)
// and stamps each remaining event with the global time
// (timed_event_generator).  The global time base (global_timer) lives here,
// next to the point where events are taken, so the stamp is as close as
// possible to the GPIO write.
//
// Interface: gpio_in is the processor's event port, sampled on every clock;
// out_ev/out_time/out_valid carry one timed event per strobe to the
// observer-monitor interface; now exposes the global time.
// Timing: a GPIO change is seen by the comparator one cycle later and leaves
// the observer two cycles after it (three with the filter in the observer).
// This delay is the same for every event.  Filter placement follows the
// configuration data of the design flow (FILT_OBS false by default).
//
// Origin: the chain comparator, optional filter, time-stamping and the filter
// placement switch follow the reference observer; the pipeline depth is this
// design's own.
module observer #(
  parameter int unsigned EVENT_W  = stmo_pkg::EVENT_W,
  parameter int unsigned TIME_W   = stmo_pkg::TIME_W,
  parameter bit          FILT_OBS = 1'b0,
  parameter int unsigned NUM_EV   = 2,
  parameter logic [NUM_EV-1:0][EVENT_W-1:0] EV_LIST = {stmo_pkg::DEF_STOP_EV, stmo_pkg::DEF_START_EV}
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [EVENT_W-1:0] gpio_in,
  output logic [EVENT_W-1:0] out_ev,
  output logic [TIME_W-1:0]  out_time,
  output logic               out_valid,
  output logic [TIME_W-1:0]  now
);

  logic [EVENT_W-1:0] sens_ev, filt_ev;
  logic               sens_mark, filt_mark;

  global_timer #(.TIME_W(TIME_W)) u_timer (
    .clk, .rst_n, .now
  );

  sensor_comparator #(.EVENT_W(EVENT_W)) u_sensor (
    .clk, .rst_n,
    .event_stream (gpio_in),
    .ev           (sens_ev),
    .event_marker (sens_mark)
  );

  if (FILT_OBS) begin : g_filter
    logic unused_tag;
    event_filter #(
      .EVENT_W (EVENT_W),
      .TAG_W   (1),
      .NUM_EV  (NUM_EV),
      .EV_LIST (EV_LIST)
    ) u_filter (
      .clk, .rst_n,
      .ev_in            (sens_ev),
      .tag_in           (1'b0),
      .event_marker_in  (sens_mark),
      .ev_out           (filt_ev),
      .tag_out          (unused_tag),
      .event_marker_out (filt_mark)
    );
  end else begin : g_no_filter
    assign filt_ev   = sens_ev;
    assign filt_mark = sens_mark;
  end

  timed_event_generator #(.EVENT_W(EVENT_W), .TIME_W(TIME_W)) u_teg (
    .clk, .rst_n,
    .ev           (filt_ev),
    .event_marker (filt_mark),
    .global_time  (now),
    .out_ev, .out_time, .out_valid
  );

endmodule
