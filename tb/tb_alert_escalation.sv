// tb_alert_escalation: random verdicts and clear requests; checks the
// sticky alarm, the interrupt pulse on a newly raised alarm and the count
// of negative verdicts against a model kept here.
//
// Origin: the stimulus, the expected values and the sizes used here are this
// testbench's own; the rules it checks are those of the design as described
// in its module header.
module tb_alert_escalation;
  logic clk = 1'b0, rst_n = 1'b0;
  logic verdict, vs, clr, alarm, irq;
  logic [15:0] fails;
  int checks = 0, failures = 0, n_irq = 0;

  alert_escalation dut (.clk, .rst_n, .verdict, .verdict_strobe (vs), .alarm_clear (clr),
                        .alarm, .irq, .fail_count (fails));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit m_alarm = 0;
    int m_fails = 0;
    verdict = 1; vs = 0; clr = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 5000; n++) begin
      bit v, s, c, m_irq;
      v = ($urandom_range(3) != 0);
      s = ($urandom_range(1) == 1);
      c = ($urandom_range(7) == 0);
      verdict <= v; vs <= s; clr <= c;
      @(posedge clk); #1;
      m_irq = s && !v && !m_alarm;
      if (s && !v) begin m_alarm = 1; m_fails++; end
      else if (c) m_alarm = 0;
      checks += 3;
      if (alarm != m_alarm) failures++;
      if (irq != m_irq) failures++;
      if (fails != 16'(m_fails)) failures++;
      if (irq) n_irq++;
    end
    checks++;
    if (n_irq < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
