// uart_event_tx: observer side of a serial observer-monitor link.
//
// Used when observer and monitor sit on different chips.  Each timed event
// is queued in a FIFO of FIFO_DEPTH entries and sent as a packet of
// (EVENT_W + TIME_W) / 8 bytes: the event value first, then the time stamp,
// most significant byte first.  Every byte is one 8N1 frame (start bit,
// eight data bits LSB first, one stop bit, no parity) at BAUD bits per
// second, and bytes of a packet follow each other without a gap.  After a
// packet the line stays idle for GAP_BITS bit times; the receiver uses this
// pause to find the start of the next packet.  Events that find the FIFO
// full are counted in overflow and lost.
//
// Since the time stamp travels with the event, the queueing delay of the
// link does not change any latency the monitor computes.
//
// Interface: ev/time/valid from the observer; txd (idle high), busy,
// overflow.  Timing: one packet takes (10 * bytes + GAP_BITS) bit times,
// one bit time being CLK_FREQ / BAUD clock cycles (434 at 50 MHz, 115200 Bd).
//
// Origin: a serial observer-monitor link with the reference configuration's
// clock, baud rate, no parity and a buffer of four entries; the packet format
// (event byte, then time most significant byte first) and the pause between
// packets are this design's own.
module uart_event_tx #(
  parameter int unsigned EVENT_W    = stmo_pkg::EVENT_W,
  parameter int unsigned TIME_W     = stmo_pkg::TIME_W,
  parameter int unsigned CLK_FREQ   = 50_000_000,
  parameter int unsigned BAUD       = 115_200,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned GAP_BITS   = 30,
  localparam int unsigned PKT_W     = EVENT_W + TIME_W,
  localparam int unsigned NBYTES    = PKT_W / 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [EVENT_W-1:0] ev,
  input  logic [TIME_W-1:0]  time_in,
  input  logic               valid,
  output logic               txd,
  output logic               busy,
  output logic [15:0]        overflow
);

  localparam int unsigned DIV = CLK_FREQ / BAUD;
  localparam int unsigned DW  = $clog2(DIV + 1);
  localparam int unsigned FAW = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;

  // ------------------------------------------------------------------ FIFO
  logic [PKT_W-1:0] fifo [FIFO_DEPTH];
  logic [FAW-1:0]   rd_p, wr_p;
  logic [FAW:0]     fill;
  logic             push, pop;

  assign push = valid && (fill != (FAW+1)'(FIFO_DEPTH));

  always_ff @(posedge clk)
    if (push) fifo[wr_p] <= {ev, time_in};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_p     <= '0;
      wr_p     <= '0;
      fill     <= '0;
      overflow <= '0;
    end else begin
      if (push) wr_p <= (wr_p == FAW'(FIFO_DEPTH - 1)) ? '0 : wr_p + 1'b1;
      if (pop)  rd_p <= (rd_p == FAW'(FIFO_DEPTH - 1)) ? '0 : rd_p + 1'b1;
      fill <= fill + (FAW+1)'(push) - (FAW+1)'(pop);
      if (valid && !push) overflow <= overflow + 1'b1;
    end
  end

  // ------------------------------------------------------------ serializer
  typedef enum logic [1:0] {S_IDLE, S_FRAME, S_GAP} state_e;
  state_e           state;
  logic [PKT_W-1:0] pkt;
  logic [9:0]       frame;       // stop, data[7:0], start; shifted out LSB first
  logic [3:0]       bit_no;
  logic [$clog2(NBYTES+1)-1:0] byte_no;
  logic [DW-1:0]    baud_cnt;
  logic [$clog2(GAP_BITS+1)-1:0] gap_cnt;
  logic             tick;

  assign tick = (baud_cnt == DW'(DIV - 1));
  assign pop  = (state == S_IDLE) && (fill != '0);
  assign busy = (state != S_IDLE) || (fill != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      txd      <= 1'b1;
      pkt      <= '0;
      frame    <= '1;
      bit_no   <= '0;
      byte_no  <= '0;
      baud_cnt <= '0;
      gap_cnt  <= '0;
    end else begin
      baud_cnt <= (state == S_IDLE || tick) ? '0 : baud_cnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          txd <= 1'b1;
          if (pop) begin
            pkt     <= {fifo[rd_p][PKT_W-9:0], 8'h00};
            frame   <= {1'b1, fifo[rd_p][PKT_W-1 -: 8], 1'b0};
            txd     <= 1'b0;                    // start bit of byte 0
            bit_no  <= 4'd1;
            byte_no <= '0;
            state   <= S_FRAME;
          end
        end
        S_FRAME: if (tick) begin
          if (bit_no == 4'd10) begin
            if (byte_no == ($bits(byte_no))'(NBYTES - 1)) begin
              state   <= S_GAP;
              gap_cnt <= '0;
              txd     <= 1'b1;
            end else begin
              byte_no <= byte_no + 1'b1;
              frame   <= {1'b1, pkt[PKT_W-1 -: 8], 1'b0};
              pkt     <= {pkt[PKT_W-9:0], 8'h00};
              txd     <= 1'b0;
              bit_no  <= 4'd1;
            end
          end else begin
            txd    <= frame[bit_no];
            bit_no <= bit_no + 1'b1;
          end
        end
        S_GAP: if (tick) begin
          if (gap_cnt == ($bits(gap_cnt))'(GAP_BITS - 1)) state <= S_IDLE;
          gap_cnt <= gap_cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
