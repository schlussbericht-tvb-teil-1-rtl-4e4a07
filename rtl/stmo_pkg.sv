// stmo_pkg: types and default constants shared by the observer and the
// statistic timing monitor (STMo).
//
// Time is counted in clock cycles of the system clock (50 MHz by default, so
// one millisecond is 50 000 ticks).  Time stamps are 64 bits wide and events
// are the 8-bit value the firmware writes to its GPIO port.
//
// The default specification is the three-bin reaction property used for the
// CAN firmware of the demonstrator: a sliding window of 30 measurements,
// tolerance 0 %, start event 0x01, stop event 0x02, nominal latency 5.52 ms
// and three equally filled bins at -0.5..-0.2 ms, -0.2..+0.2 ms and
// +0.2..+0.5 ms around it.  The bin edges below are those millisecond values
// converted to ticks; the expected count per bin is 33.33 % of 30 = 10.
//
// Origin: event width 8, 64-bit time, the start/stop codes 0x01/0x02 and the
// default specification (sliding window of 30, three equal bins around 5.52
// ms at 50 MHz, tolerance 0) are those of the reference design; expressing
// the bins as absolute cycle edges and the shares as counts is this design's
// choice.
package stmo_pkg;

  localparam int unsigned TIME_W  = 64;   // width of a time stamp
  localparam int unsigned EVENT_W = 8;    // width of an event value (GPIO port 0..7)

  // Pattern type of a property
  typedef enum logic {
    PAT_REACTION   = 1'b0,   // latency = stop time - start time of the same pair
    PAT_REPETITIVE = 1'b1    // latency = distance between successive start events
  } pattern_e;

  // Window type of a property
  typedef enum logic {
    WIN_JUMPING = 1'b0,      // a fresh set of WINDOW measurements per verdict ("looping")
    WIN_SLIDING = 1'b1       // a new verdict with every new measurement
  } window_e;

  // Protocol codes of the configuration data
  typedef enum int unsigned {
    COMM_IO   = 1,           // direct wires between observer and monitor
    COMM_GPIO = 2,           // GPIO towards the processor
    COMM_UART = 3            // serial link between observer and monitor
  } comm_e;

  // A time-stamped event as it travels from the observer to the monitor
  typedef struct packed {
    logic [EVENT_W-1:0] ev;
    logic [TIME_W-1:0]  t;
  } timed_event_t;

  // Default specification (see the header comment)
  localparam longint unsigned CLK_FREQ_HZ  = 50_000_000;
  localparam longint unsigned TICKS_PER_MS = CLK_FREQ_HZ / 1000;

  localparam int unsigned      DEF_WINDOW    = 30;
  localparam int unsigned      DEF_NUM_BINS  = 3;
  localparam int unsigned      DEF_TOLERANCE = 0;
  localparam pattern_e         DEF_PATTERN   = PAT_REACTION;
  localparam window_e          DEF_WIN_TYPE  = WIN_SLIDING;
  localparam logic [EVENT_W-1:0] DEF_START_EV = 8'h01;
  localparam logic [EVENT_W-1:0] DEF_STOP_EV  = 8'h02;

  // Bin edges in ticks: 5.02, 5.32, 5.72 and 6.02 ms.  Bin b holds latencies in
  // [edge b, edge b+1); the last bin also takes its upper edge.
  localparam logic [DEF_NUM_BINS:0][TIME_W-1:0] DEF_BIN_EDGES = {
    64'(301 * TICKS_PER_MS / 50),    // 6.02 ms = 301 000 ticks
    64'(286 * TICKS_PER_MS / 50),    // 5.72 ms
    64'(266 * TICKS_PER_MS / 50),    // 5.32 ms
    64'(251 * TICKS_PER_MS / 50)     // 5.02 ms
  };

  // Expected number of measurements per bin in a full window
  localparam logic [DEF_NUM_BINS-1:0][15:0] DEF_SPEC_COUNTS = {16'd10, 16'd10, 16'd10};

endpackage
