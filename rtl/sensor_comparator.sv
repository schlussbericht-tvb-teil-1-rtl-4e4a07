// sensor_comparator: turns the raw GPIO value written by the firmware into
// discrete events.
//
// The module keeps the last value it has seen.  Whenever the input differs
// from it, the new value becomes the current event and event_marker is high
// for exactly one clock cycle; while the input is unchanged nothing is
// reported.  Writing the same value twice therefore produces one event only,
// which is how the firmware annotations (alternating 1 and 2) are meant.
//
// Interface: event_stream is sampled every rising clock edge; ev holds the
// last value that differed; event_marker flags the cycle after the change.
// Timing: one cycle from a change of event_stream to event_marker.  After
// reset the stored value is 0, so a reset value of 0 on the port is no event.
//
// Origin: detecting a change of the event port, outputting the new value and
// flagging it with event_marker follows the reference design; the output
// register and the 8-bit width (the reference names both 7 and 8 bits; 8
// matches its configuration) are choices made here.
module sensor_comparator #(
  parameter int unsigned EVENT_W = stmo_pkg::EVENT_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [EVENT_W-1:0] event_stream,
  output logic [EVENT_W-1:0] ev,
  output logic               event_marker
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ev           <= '0;
      event_marker <= 1'b0;
    end else if (event_stream != ev) begin
      ev           <= event_stream;
      event_marker <= 1'b1;
    end else begin
      event_marker <= 1'b0;
    end
  end

endmodule
