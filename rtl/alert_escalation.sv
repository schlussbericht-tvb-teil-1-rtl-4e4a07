// alert_escalation: reacts to a negative verdict.
//
// The action on a violation is left to the integrator; this block provides
// the hardware hooks for it.  A negative valid verdict sets the sticky alarm
// output (for an LED or an interrupt line) and gives a one-cycle irq pulse
// when the alarm is first raised.  fail_count counts every negative verdict
// (saturating).  alarm stays set until alarm_clear is pulsed.
//
// Interface: verdict/verdict_strobe from the verdict unit, alarm_clear from
// software; alarm, irq, fail_count.  Timing: one cycle from verdict_strobe.
//
// Origin: the reference architecture has an alerting/escalation stage that
// acts on a negative verdict but does not define the action; the sticky
// alarm, interrupt and failure counter are this design's own.
module alert_escalation #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             verdict,
  input  logic             verdict_strobe,
  input  logic             alarm_clear,
  output logic             alarm,
  output logic             irq,
  output logic [CNT_W-1:0] fail_count
);

  logic violation;
  assign violation = verdict_strobe && !verdict;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      alarm      <= 1'b0;
      irq        <= 1'b0;
      fail_count <= '0;
    end else begin
      irq <= violation && !alarm;
      if (violation) begin
        alarm <= 1'b1;
        if (fail_count != '1) fail_count <= fail_count + 1'b1;
      end else if (alarm_clear) begin
        alarm <= 1'b0;
      end
    end
  end

endmodule
