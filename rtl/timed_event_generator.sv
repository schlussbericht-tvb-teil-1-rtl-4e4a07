// timed_event_generator: attaches the global time to every event.
//
// On each cycle with event_marker high the event value and the current
// global time are registered together and presented as one timed event with
// valid high for one cycle.  Because every event takes the same path, the
// delay between the GPIO write and its time stamp is the same for all events
// and cancels out of every latency the monitor computes.
//
// Interface: ev/event_marker from the sensor or the filter, global_time from
// the global timer; out is the timed event (event value and 64-bit time),
// out_valid its strobe.  Timing: one cycle from event_marker to out_valid;
// the stamp is the timer value in the cycle event_marker was high.
//
// Origin: stamping each event with the global time at a fixed delay follows
// the reference design; the one-cycle delay and the valid-pulse interface are
// choices made here.
module timed_event_generator
#(
  parameter int unsigned EVENT_W = stmo_pkg::EVENT_W,
  parameter int unsigned TIME_W  = stmo_pkg::TIME_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [EVENT_W-1:0] ev,
  input  logic               event_marker,
  input  logic [TIME_W-1:0]  global_time,
  output logic [EVENT_W-1:0] out_ev,
  output logic [TIME_W-1:0]  out_time,
  output logic               out_valid
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_ev    <= '0;
      out_time  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= event_marker;
      if (event_marker) begin
        out_ev   <= ev;
        out_time <= global_time;
      end
    end
  end

endmodule
