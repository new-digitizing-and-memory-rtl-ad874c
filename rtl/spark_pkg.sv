// spark_pkg: sizes and the stored word format shared by the spark-chamber
// digitizer. The system records, for every spark arriving on one of 64
// magnetostrictive pickup lines, the reading of a single 15-bit 20-MHz time
// scaler together with a 12-bit input identification, in a 1024-word
// shift-register memory built from four interleaved 256-word banks.
// Sizes follow the original 1000-spark system; the bit order inside the
// stored word is this design's own choice.
package spark_pkg;

  localparam int unsigned GROUPS      = 8;    // 8 groups of pickup inputs
  localparam int unsigned LINES       = 8;    // 8 inputs (lines) per group
  localparam int unsigned LINE_W      = 3;    // priority-encoder address width
  localparam int unsigned SCALER_W    = 15;   // 20-MHz time scaler
  localparam int unsigned SPARK_W     = 10;   // spark counter / latch
  localparam int unsigned BANKS       = 4;    // interleaved memory banks A..D
  localparam int unsigned BANK_DEPTH  = 256;  // words per bank (INTEL 1402)
  localparam int unsigned LOAD_CYCLES = 4;    // 200 ns bank load at 50 ns clock
  localparam int unsigned WORD_W      = 28;   // bits per memory word
  localparam int unsigned HALF_W      = 14;   // computer word width

  // One stored spark: 15-bit time + 12-bit identification + 1 spare bit.
  // The 12-bit identification is the 8-bit group pattern (multiplexer
  // outputs), the 3-bit line address (priority encoder) and the
  // coincidence bit.
  typedef struct packed {
    logic                spare;
    logic                coinc;
    logic [GROUPS-1:0]   groups;
    logic [LINE_W-1:0]   line;
    logic [SCALER_W-1:0] time_cnt;
  } spark_word_t;

  // Event sequencer states.
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,  // waiting for a trigger
    ST_RECORD  = 3'd1,  // scaler running, sparks stored
    ST_XFER    = 3'd2,  // spark count copied to its latch
    ST_ADVANCE = 3'd3,  // memory advanced until the spark counter overflows
    ST_DRAIN   = 3'd4,  // last bank loads finishing
    ST_READOUT = 3'd5   // computer reads the memory
  } state_t;

endpackage
