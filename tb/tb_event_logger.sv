// tb_event_logger: writes random records, more than the buffer holds, and
// reads them back by age after every write.
//
// Origin: the stimulus, the expected values and the sizes used here are this
// testbench's own; the rules it checks are those of the design as described
// in its module header.
module tb_event_logger;
  localparam int D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we;
  logic [81:0] wdata, rdata;
  logic [2:0] idx;
  logic [3:0] count;
  logic [31:0] total;
  int checks = 0, failures = 0;

  event_logger #(.DATA_W (82), .DEPTH (D)) dut (.clk, .rst_n, .we, .wdata,
    .rd_idx (idx), .rd_data (rdata), .count, .total);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [81:0] hist [$];
    we = 0; wdata = 0; idx = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    checks++;
    if (count != 0) failures++;
    for (int n = 0; n < 40; n++) begin
      logic [81:0] r;
      r = {18'($urandom), 32'($urandom), 32'($urandom)};
      hist.push_front(r);
      we <= 1'b1; wdata <= r;
      @(posedge clk);
      we <= 1'b0;
      #1;
      checks += 2;
      if (count != 4'((n + 1 < D) ? n + 1 : D)) failures++;
      if (total != 32'(n + 1)) failures++;
      for (int a = 0; a < D && a < hist.size(); a++) begin
        idx = 3'(a);
        #1;
        checks++;
        if (rdata != hist[a]) begin failures++; $display("write %0d age %0d wrong", n, a); end
      end
      repeat ($urandom_range(2)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
