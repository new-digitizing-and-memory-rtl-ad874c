// controller: the event sequencer.
//   IDLE    -> RECORD  on trigger: the time scaler is started, the spark
//                      counter and latch steering are cleared, the holding
//                      flip-flops and the spark detector are enabled.
//   RECORD  -> XFER    on the scaler overflow carry: recording stops.
//   XFER    -> ADVANCE the spark count is copied into its latch (one cycle).
//   ADVANCE -> DRAIN   every cycle advances the spark counter and pushes a
//                      filler word into the memory, until the spark counter
//                      overflows; the first spark is then at the memory
//                      output whatever the number of sparks.
//   DRAIN   -> READOUT when no bank is still loading.
//   READOUT -> IDLE    when the computer signals the end of its readout.
// busy is high from the trigger until the spark counter overflow stops the
// advance pulses; rd_ready (rd_active) follows once the last bank load has
// finished, at most LOAD_CYCLES-1 cycles later. det_enable is
// withheld when the spark counter is full so that the count never wraps
// during recording (this design's choice). The one-cycle XFER and DRAIN
// states and the rd_done handshake are this design's; the order of events
// follows the original.
module controller
  import spark_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   trigger,
  input  logic   scaler_carry,
  input  logic   spark_full,
  input  logic   spark_carry,
  input  logic   banks_busy,
  input  logic   rd_done,
  output state_t state,
  output logic   start,       // start scaler, clear counters (one cycle)
  output logic   recording,   // holding flip-flops enabled
  output logic   det_enable,  // spark detector enabled
  output logic   latch_en,    // spark count -> latch
  output logic   advance,     // advance pulse to spark counter and memory
  output logic   busy,
  output logic   rd_active
);

  assign start      = (state == ST_IDLE) && trigger;
  assign recording  = (state == ST_RECORD);
  assign det_enable = recording && !spark_full;
  assign latch_en   = (state == ST_XFER);
  assign advance    = (state == ST_ADVANCE);
  assign busy       = (state inside {ST_RECORD, ST_XFER, ST_ADVANCE});
  assign rd_active  = (state == ST_READOUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= ST_IDLE;
    else begin
      unique case (state)
        ST_IDLE:    if (trigger)      state <= ST_RECORD;
        ST_RECORD:  if (scaler_carry) state <= ST_XFER;
        ST_XFER:                      state <= ST_ADVANCE;
        ST_ADVANCE: if (spark_carry)  state <= ST_DRAIN;
        ST_DRAIN:   if (!banks_busy)  state <= ST_READOUT;
        ST_READOUT: if (rd_done)      state <= ST_IDLE;
        default:                      state <= ST_IDLE;
      endcase
    end
  end

endmodule
