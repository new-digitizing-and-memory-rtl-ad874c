// group_mux: one LINES-to-1 multiplexer per group. Multiplexer j passes the
// holding flip-flop of input `line` in group j, so the GROUPS outputs form a
// bit pattern of the groups in which that line fired; several bits are set
// when the same line fired in several groups at once. Combinational. The
// select comes from the priority encoder, as in the original design.
module group_mux #(
  parameter int unsigned GROUPS = spark_pkg::GROUPS,
  parameter int unsigned LINES  = spark_pkg::LINES,
  localparam int unsigned LW    = $clog2(LINES)
) (
  input  logic [GROUPS-1:0][LINES-1:0] hold,
  input  logic [LW-1:0]                line,
  output logic [GROUPS-1:0]            groups
);

  always_comb
    for (int j = 0; j < GROUPS; j++)
      groups[j] = hold[j][line];

endmodule
