// spark_digitizer: digitizing and memory system for 64 magnetostrictive
// spark-chamber pickups (8 groups of 8 lines), storing up to 1023 sparks per
// event in a 1024-word shift-register memory.
//
// One free-running 20-MHz scaler replaces the per-spark scalers of a
// conventional readout: at every spark its reading is written, together with
// the identity of the pickup, into a shift-register memory.
//   Front end   holding flip-flops catch each arrival; eight OR circuits and
//               a priority encoder pick the highest active line i, eight group
//               multiplexers give the groups in which line i fired, and the
//               comparator flags a coincidence with other lines.
//   Store       the spark detector strobes the word {coinc, groups, line,
//               time} into the next of four latches, bumps the spark counter
//               and, through the one-of-eight decoder, clears line i in all
//               groups; pending lines are stored on the following cycles.
//   Memory      four banks of 256 words, each loaded from its latch over four
//               cycles, interleaved so the memory takes one word per cycle.
//   Alignment   at the scaler overflow the spark count is latched and the
//               memory is advanced with filler words until the spark counter
//               overflows: 1024 words in all, so the first spark is at the
//               output end of bank A.
//   Readout     each rd_req presents the next 14-bit word on rd_data: the
//               spark count, then the sparks in arrival order, two halves each.
// Interface: clk is the 20-MHz clock, all inputs are synchronous to it,
// trigger and rd_req are one-cycle pulses. busy is high from the trigger
// until the memory is aligned; rd_ready is then high until rd_done.
// rd_data is valid from the cycle after each rd_req.
module spark_digitizer #(
  parameter int unsigned SCALER_W    = spark_pkg::SCALER_W,
  parameter int unsigned SPARK_W     = spark_pkg::SPARK_W,
  parameter int unsigned BANK_DEPTH  = spark_pkg::BANK_DEPTH,
  parameter int unsigned LOAD_CYCLES = spark_pkg::LOAD_CYCLES
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         trigger,
  input  logic [spark_pkg::GROUPS-1:0][spark_pkg::LINES-1:0] pickup,
  input  logic                         rd_req,
  input  logic                         rd_done,
  output logic                         busy,
  output logic                         rd_ready,
  output logic [spark_pkg::HALF_W-1:0]            rd_data
);

  // The memory holds exactly as many words as the spark counter can count.
  initial assert (spark_pkg::BANKS * BANK_DEPTH == 2 ** SPARK_W)
    else $error("spark_digitizer: memory depth must equal 2**SPARK_W");
  initial assert (SCALER_W <= spark_pkg::SCALER_W)
    else $error("spark_digitizer: time field is %0d bits", spark_pkg::SCALER_W);

  // ---- sequencer --------------------------------------------------------
  spark_pkg::state_t state;
  logic   start, recording, det_enable, latch_en, advance, rd_active;
  logic   scaler_carry, spark_full, spark_carry, banks_busy;

  controller u_ctrl (
    .clk, .rst_n, .trigger, .scaler_carry, .spark_full, .spark_carry,
    .banks_busy, .rd_done, .state, .start, .recording, .det_enable,
    .latch_en, .advance, .busy, .rd_active
  );

  // ---- time scaler ------------------------------------------------------
  logic [SCALER_W-1:0] scaler;
  logic                scaler_running;

  master_counter #(.WIDTH(SCALER_W)) u_scaler (
    .clk, .rst_n, .start, .count(scaler), .running(scaler_running),
    .carry(scaler_carry)
  );

  // ---- input identification --------------------------------------------
  logic [spark_pkg::GROUPS-1:0][spark_pkg::LINES-1:0] hold;
  logic [spark_pkg::LINES-1:0]             line_any, clr_line;
  logic [spark_pkg::LINE_W-1:0]            line;
  logic                         line_valid, coinc, store;
  logic [spark_pkg::GROUPS-1:0]            group_bits;

  holding_ffs u_hold (
    .clk, .rst_n, .enable(recording), .pickup, .clr_line, .hold
  );

  priority_encoder u_penc (
    .hold, .line_any, .line, .valid(line_valid)
  );

  group_mux u_gmux (.hold, .line, .groups(group_bits));

  coinc_comparator u_comp (.line_any, .coinc);

  spark_detector u_det (.line_any, .enable(det_enable), .store);

  line_decoder u_dec (.line, .en(store), .clr_line);

  // ---- spark counter and latch -------------------------------------------
  logic [SPARK_W-1:0] spark_count, spark_latch;

  spark_counter #(.WIDTH(SPARK_W)) u_spk (
    .clk, .rst_n, .clear(start), .inc(store || advance), .latch_en,
    .count(spark_count), .latched(spark_latch), .full(spark_full),
    .carry(spark_carry)
  );

  // ---- word latches and memory banks -------------------------------------
  spark_pkg::spark_word_t                  word;
  logic [spark_pkg::BANKS-1:0][spark_pkg::WORD_W-1:0] latch_q, bank_q;
  logic [spark_pkg::BANKS-1:0]             bank_start, bank_shift, bank_busy;
  logic [$clog2(spark_pkg::BANKS)-1:0]     load_sel;

  always_comb begin
    word          = '0;
    word.coinc    = coinc;
    word.groups   = group_bits;
    word.line     = line;
    word.time_cnt = spark_pkg::SCALER_W'(scaler);
    if (!store) word = '0;   // advance pulses push filler words
  end

  word_latches u_latch (
    .clk, .rst_n, .clear(start), .load(store || advance), .din(word),
    .latch_q, .bank_start, .sel(load_sel)
  );

  for (genvar k = 0; k < spark_pkg::BANKS; k++) begin : g_bank
    sr_bank #(.DEPTH(BANK_DEPTH), .LOAD_CYCLES(LOAD_CYCLES)) u_bank (
      .clk, .rst_n, .start(bank_start[k] || bank_shift[k]),
      .din(latch_q[k]), .busy(bank_busy[k]), .dout(bank_q[k])
    );
  end

  assign banks_busy = |bank_busy;

  // ---- readout ----------------------------------------------------------
  logic ff2, ff3;
  logic [$clog2(spark_pkg::BANKS)-1:0] rsel;

  readout_ctrl u_rd (
    .clk, .rst_n, .active(rd_active), .rd_req, .spark_latch, .bank_q,
    .bank_shift, .rd_data, .ff2, .ff3, .rsel
  );

  assign rd_ready = rd_active;

  // After alignment exactly 2**SPARK_W words have entered the memory: the
  // spark counter has wrapped to zero and the latch steering is back at A.
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (state == spark_pkg::ST_READOUT) |-> (spark_count == '0 && load_sel == '0));

  // A store is only possible while the scaler runs.
  a_store_in_record: assert property (@(posedge clk) disable iff (!rst_n)
    store |-> (recording && scaler_running && line_valid));

endmodule
