// tb_verdict_unit: random outcome sequences; from the third outcome on the
// verdict must be the 2-of-3 majority of the last three, before that it is 1
// and not valid.
//
// Origin: the stimulus, the expected values and the sizes used here are this
// testbench's own; the rules it checks are those of the design as described
// in its module header.
module tb_verdict_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  logic outcome, ov, verdict, vv, vs;
  int checks = 0, failures = 0, n_neg = 0;

  verdict_unit dut (.clk, .rst_n, .outcome, .outcome_valid (ov),
                    .verdict, .verdict_valid (vv), .verdict_strobe (vs));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit h [$];
    ov = 0; outcome = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 3000; n++) begin
      bit o;
      o = ($urandom_range(2) != 0);
      h.push_back(o);
      outcome <= o; ov <= 1'b1;
      @(posedge clk);
      ov <= 1'b0;
      #1;
      if (h.size() < 3) begin
        checks++;
        if (vv || vs || !verdict) failures++;
      end else begin
        int s;
        s = h[h.size()-1] + h[h.size()-2] + h[h.size()-3];
        checks += 2;
        if (!vv || !vs) failures++;
        if (verdict != (s >= 2)) begin failures++; $display("n=%0d verdict %0b sum %0d", n, verdict, s); end
        if (!verdict) n_neg++;
      end
      repeat ($urandom_range(2)) @(posedge clk);
    end
    checks++;
    if (n_neg < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
