// sr_bank: one memory bank, WIDTH parallel serial shift registers of DEPTH
// bits each (28 INTEL 1402 256-bit devices in the original). The parts run at
// 5 MHz, so one shift takes LOAD_CYCLES cycles of the 20-MHz clock: start
// begins a shift and, LOAD_CYCLES-1 edges later, din is shifted in at the
// input end while every word moves one place toward the output end. busy is
// high from the start edge until the shift edge, and start must not come
// while busy. dout is the word at the output end. din is sampled at the shift
// edge; the word latch in front of the bank keeps it stable until then.
// The shift register has no reset: after every event exactly DEPTH words
// pass through each bank, so old contents never reach the output.
module sr_bank #(
  parameter int unsigned WIDTH       = spark_pkg::WORD_W,
  parameter int unsigned DEPTH       = spark_pkg::BANK_DEPTH,
  parameter int unsigned LOAD_CYCLES = spark_pkg::LOAD_CYCLES,
  localparam int unsigned TW         = $clog2(LOAD_CYCLES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] din,
  output logic             busy,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] sr [DEPTH];
  logic [TW-1:0]    timer;
  logic             shift;

  assign busy  = (timer != '0);
  assign shift = (timer == TW'(1));
  assign dout  = sr[DEPTH-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      timer <= '0;
    else if (start && !busy)
      timer <= TW'(LOAD_CYCLES - 1);
    else if (busy)
      timer <= timer - TW'(1);
  end

  always_ff @(posedge clk) begin
    if (shift) begin
      sr[0] <= din;
      for (int k = 1; k < DEPTH; k++) sr[k] <= sr[k-1];
    end
  end

  initial assert (LOAD_CYCLES >= 2)
    else $error("sr_bank: LOAD_CYCLES must be at least 2");

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(start && busy))
    else $error("sr_bank: shift requested while the bank is still loading");

endmodule
