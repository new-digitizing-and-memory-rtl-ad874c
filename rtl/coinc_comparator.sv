// coinc_comparator: the digital comparator that raises the coincidence bit
// when signals are pending on more than one line i at the moment a word is
// stored, i.e. when the line stored now is not the only active OR output.
// The first word of a coincident group and every following member except the
// last carry the bit, so software can find the group and use the time of its
// first member. Combinational. The original names the comparator and its
// purpose; comparing the active-line set against "exactly one" is this
// design's reading of it.
module coinc_comparator #(
  parameter int unsigned LINES = spark_pkg::LINES
) (
  input  logic [LINES-1:0] line_any,
  output logic             coinc
);

  // More than one bit set: clearing the lowest set bit leaves something.
  assign coinc = |(line_any & (line_any - LINES'(1)));

endmodule
