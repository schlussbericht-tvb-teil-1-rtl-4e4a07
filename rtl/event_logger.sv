// event_logger: keeps the most recent monitor results for back-tracing.
//
// A circular buffer of DEPTH records of DATA_W bits.  Every cycle with we
// high stores wdata and overwrites the oldest record once the buffer is
// full.  Records are read back by age: rd_idx 0 is the newest record, 1 the
// one before, and so on; count says how many records are valid (saturates
// at DEPTH) and total how many were ever written.  The monitor stores one
// record per assessed window (time stamp, window number, outcome, verdict).
//
// Interface: we/wdata write port, rd_idx/rd_data read port (combinational
// read of the registered buffer), count, total.
// Timing: a record written in cycle n is readable at rd_idx 0 from cycle n+1.
//
// Origin: the reference architecture logs continuously so that problems can
// be traced back, without defining the record; the ring buffer and its record
// format are this design's own.
module event_logger #(
  parameter int unsigned DATA_W = 82,
  parameter int unsigned DEPTH  = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     rd_idx,
  output logic [DATA_W-1:0] rd_data,
  output logic [AW:0]       count,
  output logic [31:0]       total
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     wp;          // next address to write
  logic [AW-1:0]     ra;

  always_ff @(posedge clk)
    if (we) mem[wp] <= wdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      count <= '0;
      total <= '0;
    end else if (we) begin
      wp    <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (count != (AW+1)'(DEPTH)) count <= count + 1'b1;
      total <= total + 1'b1;
    end
  end

  // address of the record rd_idx steps before the newest one
  always_comb begin
    logic [AW:0] back;
    back = {1'b0, wp} + (AW+1)'(DEPTH) - (AW+1)'(1) - {1'b0, rd_idx};
    ra   = (back >= (AW+1)'(DEPTH)) ? AW'(back - (AW+1)'(DEPTH)) : AW'(back);
  end

  assign rd_data = mem[ra];

endmodule
