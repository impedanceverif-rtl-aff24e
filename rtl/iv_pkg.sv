// iv_pkg: constants and types shared by the impedance-sensing tamper detector.
//
// The measurement plan (152 frequency points, 105 repetitions per point, a
// band of 100 Hz to 588 MHz, a Wasserstein threshold of 3 milliohm) follows
// the published measurement campaign. Widths, the system clock, the host
// command codes and the current-source size are this design's own choices.
package iv_pkg;

  // Measurement plan
  localparam int unsigned NUM_FREQ       = 152;        // frequency points per scan
  localparam int unsigned NUM_REP        = 105;        // repetitions per frequency point
  localparam longint unsigned F_MIN_HZ   = 100;        // lowest stimulus frequency
  localparam longint unsigned F_MAX_HZ   = 588_000_000;// highest stimulus frequency
  localparam longint unsigned F_CLK_HZ   = 100_000_000;// system clock (own choice)
  localparam longint unsigned PULSE_MIN_HZ = 25_000_000; // pulse wave at and above this

  // Data widths
  localparam int unsigned CNT_W = 24;   // RO edge counter
  localparam int unsigned Z_W   = 16;   // impedance sample, 1 milliohm per LSB
  localparam int unsigned WD_W  = 24;   // sum of |g - t| over NUM_REP samples
  localparam int unsigned FIDX_W = 8;   // frequency index
  localparam int unsigned RIDX_W = 7;   // repetition index

  // Detection threshold on the 1-Wasserstein distance, in milliohm
  localparam int unsigned WD_THRESH_MOHM = 3;

  // Power distribution network under test
  typedef enum logic {
    PDN_CORE = 1'b0,   // V_CCINT: CLB current source, logic RO
    PDN_IO   = 1'b1    // V_CCO:   I/O-pin current source, IOBUF RO
  } pdn_e;

  // One entry of the frequency plan
  typedef struct packed {
    logic [31:0] freq_hz;  // stimulus frequency, rounded to 1 Hz
    logic [31:0] ftw;      // phase-accumulator tuning word (sine mode)
    logic        pulse;    // 1: pulse wave from the clock manager
  } fpoint_t;

  // Host command bytes (ASCII)
  localparam logic [7:0] CMD_ENROLL = 8'h45; // 'E' enroll the golden signature
  localparam logic [7:0] CMD_VERIFY = 8'h56; // 'V' run a verification scan
  localparam logic [7:0] CMD_CORE   = 8'h43; // 'C' select the core PDN
  localparam logic [7:0] CMD_IO     = 8'h49; // 'I' select the I/O PDN
  localparam logic [7:0] CMD_STATUS = 8'h53; // 'S' reply with the status byte
  localparam logic [7:0] CMD_WDUMP  = 8'h57; // 'W' dump the WD profile of the last scan

  // Status byte returned for CMD_STATUS
  typedef struct packed {
    logic [1:0] rsvd;
    logic       zeroized;   // key has been cleared
    logic       pdn_io;     // selected PDN
    logic       enrolled;   // golden signature present for the selected PDN
    logic       tamper;     // last verification found a difference
    logic       done;       // a scan has completed
    logic       busy;       // a scan is running
  } status_t;

endpackage
