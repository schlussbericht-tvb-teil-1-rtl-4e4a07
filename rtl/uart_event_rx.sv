// uart_event_rx: monitor side of the serial observer-monitor link.
//
// Receives the packets sent by uart_event_tx and hands each one to the
// monitor as a timed event.  The line is synchronised with two flip-flops;
// with USE_DEBOUNCER set, a 3-sample majority filter then suppresses single
// glitches.  A byte is an 8N1 frame sampled in the middle of every bit; a
// frame whose stop bit is low is a framing error: it is counted and the
// packet under way is discarded.  Bytes are assembled into a packet of
// (EVENT_W + TIME_W) / 8 bytes, event value first and time stamp most
// significant byte first.  A line that stays idle for more than IDLE_BITS
// bit times between bytes restarts packet assembly, which keeps the
// receiver aligned to the packet boundaries the transmitter marks with a
// pause.
//
// Interface: rxd (idle high); ev/time_out/valid (one-cycle strobe per packet),
// frame_errors.  Timing: valid rises about half a bit time after the middle
// of the last stop bit of a packet (plus the two synchroniser cycles).
//
// Origin: the receiver side of the serial link with a switchable debouncer,
// as in the reference configuration; the synchroniser, the 3-sample majority
// debouncer, the resynchronisation on a pause and the error counter are this
// design's own.
module uart_event_rx #(
  parameter int unsigned EVENT_W       = stmo_pkg::EVENT_W,
  parameter int unsigned TIME_W        = stmo_pkg::TIME_W,
  parameter int unsigned CLK_FREQ      = 50_000_000,
  parameter int unsigned BAUD          = 115_200,
  parameter bit          USE_DEBOUNCER = 1'b1,
  parameter int unsigned IDLE_BITS     = 20,
  localparam int unsigned PKT_W        = EVENT_W + TIME_W,
  localparam int unsigned NBYTES       = PKT_W / 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rxd,
  output logic [EVENT_W-1:0] ev,
  output logic [TIME_W-1:0]  time_out,
  output logic               valid,
  output logic [15:0]        frame_errors
);

  localparam int unsigned DIV = CLK_FREQ / BAUD;
  localparam int unsigned DW  = $clog2(DIV + 1);
  localparam int unsigned IW  = $clog2(IDLE_BITS * DIV + 1);
  localparam int unsigned BW  = $clog2(NBYTES + 1);

  // ---------------------------------------------------- input conditioning
  logic [1:0] sync;
  logic [2:0] hist;
  logic       line;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync <= 2'b11;
      hist <= 3'b111;
    end else begin
      sync <= {sync[0], rxd};
      hist <= {hist[1:0], sync[1]};
    end
  end

  assign line = USE_DEBOUNCER ? ((hist[0] & hist[1]) | (hist[0] & hist[2]) | (hist[1] & hist[2]))
                              : sync[1];

  // ------------------------------------------------------------ frame FSM
  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} state_e;
  state_e           state;
  logic [DW-1:0]    cnt;
  logic [2:0]       bit_no;
  logic [7:0]       shreg;
  logic [PKT_W-9:0] pkt;         // all bytes of a packet but the last
  logic [BW-1:0]    nbytes;
  logic [IW-1:0]    idle_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= R_IDLE;
      cnt          <= '0;
      bit_no       <= '0;
      shreg        <= '0;
      pkt          <= '0;
      nbytes       <= '0;
      idle_cnt     <= '0;
      valid        <= 1'b0;
      ev           <= '0;
      time_out     <= '0;
      frame_errors <= '0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        R_IDLE: begin
          cnt <= '0;
          if (!line) begin
            state    <= R_START;
            idle_cnt <= '0;
          end else if (idle_cnt == IW'(IDLE_BITS * DIV)) begin
            nbytes   <= '0;                 // pause: next byte opens a packet
          end else begin
            idle_cnt <= idle_cnt + 1'b1;
          end
        end
        R_START: begin
          if (cnt == DW'(DIV / 2 - 1)) begin
            cnt <= '0;
            if (line) state <= R_IDLE;      // too short: a glitch, not a start bit
            else begin
              state  <= R_DATA;
              bit_no <= '0;
            end
          end else cnt <= cnt + 1'b1;
        end
        R_DATA: begin
          if (cnt == DW'(DIV - 1)) begin
            cnt   <= '0;
            shreg <= {line, shreg[7:1]};
            if (bit_no == 3'd7) state <= R_STOP;
            bit_no <= bit_no + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        R_STOP: begin
          if (cnt == DW'(DIV - 1)) begin
            cnt   <= '0;
            state <= R_IDLE;
            if (!line) begin
              frame_errors <= frame_errors + 1'b1;
              nbytes       <= '0;
            end else if (nbytes == BW'(NBYTES - 1)) begin
              ev       <= pkt[PKT_W-9 -: EVENT_W];
              time_out <= {pkt[TIME_W-9:0], shreg};
              valid    <= 1'b1;
              nbytes   <= '0;
            end else begin
              pkt    <= {pkt[PKT_W-17:0], shreg};
              nbytes <= nbytes + 1'b1;
            end
          end else cnt <= cnt + 1'b1;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
