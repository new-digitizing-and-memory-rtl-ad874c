// word_latches: the four word latches A..D in front of the memory banks and
// the 2-bit counter that steers loads among them. Each load (a spark store,
// or an advance pulse after recording) writes din into the latch the counter
// points at, raises bank_start for that latch's bank and advances the
// counter, so consecutive words go to banks A, B, C, D, A, ... A bank takes
// four 50-ns cycles to load (5-MHz shift registers); the latch holds its word
// meanwhile, and since the next load into the same latch comes at least four
// loads later, the memory as a whole accepts one word per 20-MHz cycle.
// clear returns the steering counter to A at the trigger.
// Timing: latch_q and the steering counter update at the edge where load is
// high; bank_start is combinational with load. Latch width is one memory word
// here (the original used 30-bit latches for a 28-bit word).
module word_latches #(
  parameter int unsigned BANKS  = spark_pkg::BANKS,
  parameter int unsigned WORD_W = spark_pkg::WORD_W,
  localparam int unsigned SW    = $clog2(BANKS)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         load,
  input  logic [WORD_W-1:0]            din,
  output logic [BANKS-1:0][WORD_W-1:0] latch_q,
  output logic [BANKS-1:0]             bank_start,
  output logic [SW-1:0]                sel
);

  always_comb begin
    bank_start = '0;
    if (load) bank_start[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel     <= '0;
      latch_q <= '0;
    end else begin
      if (clear)
        sel <= '0;
      else if (load) begin
        latch_q[sel] <= din;
        sel          <= (sel == SW'(BANKS - 1)) ? '0 : sel + SW'(1);
      end
    end
  end

endmodule
