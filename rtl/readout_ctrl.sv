// readout_ctrl: the readout flip-flops FF2 and FF3, the 2-bit readout bank
// counter and the memory output multiplexer that present the event to the
// computer one HALF_W-bit word per read request.
//
// Sequence of read requests (FF2 and FF3 start off when readout begins):
//   1st  FF2 on            -> spark count latch (zero-extended)
//   2nd  FF3 on            -> first half (bits HALF_W-1:0) of bank A
//   3rd  FF2 off           -> second half (upper bits) of bank A
//   4th  FF2 on            -> bank counter advances: first half of bank B,
//                             and bank A is shifted by one word
//   then alternately second half / next bank's first half, A B C D A ...
// bank_shift[k] is a one-cycle request to shift bank k, given with the
// request that leaves bank k. rd_data is combinational from the flip-flops
// and the bank outputs, so it is valid from the cycle after the request
// (the shift of a bank does not disturb the bank being read). While active
// is low the flip-flops and the counter are held clear. The request sequence
// follows the original; the half order and zero-extension are this design's.
module readout_ctrl #(
  parameter int unsigned BANKS   = spark_pkg::BANKS,
  parameter int unsigned WORD_W  = spark_pkg::WORD_W,
  parameter int unsigned HALF_W  = spark_pkg::HALF_W,
  parameter int unsigned SPARK_W = spark_pkg::SPARK_W,
  localparam int unsigned SW     = $clog2(BANKS)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         active,
  input  logic                         rd_req,
  input  logic [SPARK_W-1:0]           spark_latch,
  input  logic [BANKS-1:0][WORD_W-1:0] bank_q,
  output logic [BANKS-1:0]             bank_shift,
  output logic [HALF_W-1:0]            rd_data,
  output logic                         ff2,
  output logic                         ff3,
  output logic [SW-1:0]                rsel
);

  logic next_bank;   // request that moves on to the next bank's word
  assign next_bank = active && rd_req && ff3 && !ff2;

  always_comb begin
    bank_shift = '0;
    if (next_bank) bank_shift[rsel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff2  <= 1'b0;
      ff3  <= 1'b0;
      rsel <= '0;
    end else if (!active) begin
      ff2  <= 1'b0;
      ff3  <= 1'b0;
      rsel <= '0;
    end else if (rd_req) begin
      if (!ff3) begin
        if (!ff2) ff2 <= 1'b1;      // select the spark count latch
        else      ff3 <= 1'b1;      // switch to the memory
      end else begin
        ff2 <= !ff2;                // alternate halves
        if (next_bank)
          rsel <= (rsel == SW'(BANKS - 1)) ? '0 : rsel + SW'(1);
      end
    end
  end

  always_comb begin
    logic [WORD_W-1:0] w;
    w = bank_q[rsel];
    if (!ff3)
      rd_data = ff2 ? HALF_W'(spark_latch) : '0;
    else if (ff2)
      rd_data = w[HALF_W-1:0];
    else
      rd_data = HALF_W'(w >> HALF_W);
  end

endmodule
