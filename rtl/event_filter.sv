// event_filter: drops events that the timing specification does not name.
//
// When event_marker_in is high the incoming event is compared with every
// entry of EV_LIST.  On a match the event (and its tag) is registered to the
// output with event_marker_out high for one cycle; otherwise it is discarded.
// The tag travels alongside the event untouched: when the filter sits in the
// monitor it is the time stamp, when it sits in the observer it is unused.
//
// Interface: ev_in/tag_in/event_marker_in in, ev_out/tag_out/event_marker_out
// out.  Timing: one clock cycle of latency for every event, matched or not,
// so the delay an event sees is constant.
//
// Origin: passing only the events the specification names, and placing the
// filter in either the observer or the monitor, follows the reference design;
// the registered output and the carried tag (which lets the same block sit
// after the time-stamping) are this design's own.
module event_filter #(
  parameter int unsigned EVENT_W = stmo_pkg::EVENT_W,
  parameter int unsigned TAG_W   = stmo_pkg::TIME_W,
  parameter int unsigned NUM_EV  = 2,
  parameter logic [NUM_EV-1:0][EVENT_W-1:0] EV_LIST = {stmo_pkg::DEF_STOP_EV, stmo_pkg::DEF_START_EV}
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [EVENT_W-1:0] ev_in,
  input  logic [TAG_W-1:0]   tag_in,
  input  logic               event_marker_in,
  output logic [EVENT_W-1:0] ev_out,
  output logic [TAG_W-1:0]   tag_out,
  output logic               event_marker_out
);

  logic hit;

  always_comb begin
    hit = 1'b0;
    for (int i = 0; i < NUM_EV; i++)
      if (ev_in == EV_LIST[i]) hit = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ev_out           <= '0;
      tag_out          <= '0;
      event_marker_out <= 1'b0;
    end else begin
      event_marker_out <= event_marker_in && hit;
      if (event_marker_in && hit) begin
        ev_out  <= ev_in;
        tag_out <= tag_in;
      end
    end
  end

endmodule
