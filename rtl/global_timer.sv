// global_timer: the global time base of the monitoring system.
//
// A free-running counter that advances by one every clock cycle from zero at
// reset.  The timed-event generator copies its value into every event, so
// all time stamps and all bin edges of a specification are in clock cycles.
// A 64-bit counter at 50 MHz wraps after more than 11 000 years, so wrap-around
// is not handled.
//
// Interface: clk, active-low synchronous reset rst_n, output now (the count).
// Timing: now is 0 in the first cycle after reset and n in the n-th cycle after.
//
// Origin: a global time base that stamps every event is part of the reference
// observer; counting clock cycles, the 64-bit width and the reset to zero are
// choices made here.
module global_timer #(
  parameter int unsigned TIME_W = stmo_pkg::TIME_W
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [TIME_W-1:0] now
);

  always_ff @(posedge clk) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

endmodule
