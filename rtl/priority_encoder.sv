// priority_encoder: the eight OR circuits and the priority encoder of the
// input-identification logic. OR circuit i collects holding flip-flop i of
// every group (line_any[i]); the encoder reports the largest active i on
// line and raises valid when any line is active. Purely combinational.
// The "largest i wins" rule follows the original; the output is the line
// address that goes into the memory word and drives the group multiplexers
// and the one-of-eight decoder.
module priority_encoder #(
  parameter int unsigned GROUPS = spark_pkg::GROUPS,
  parameter int unsigned LINES  = spark_pkg::LINES,
  localparam int unsigned LW    = $clog2(LINES)
) (
  input  logic [GROUPS-1:0][LINES-1:0] hold,
  output logic [LINES-1:0]             line_any,
  output logic [LW-1:0]                line,
  output logic                         valid
);

  always_comb begin
    line_any = '0;
    for (int j = 0; j < GROUPS; j++)
      line_any |= hold[j];
  end

  always_comb begin
    line = '0;
    for (int i = 0; i < LINES; i++)
      if (line_any[i]) line = LW'(i);
  end

  assign valid = |line_any;

endmodule
