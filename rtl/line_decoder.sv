// line_decoder: the one-of-eight decoder. When the store strobe en is high it
// drives clr_line[line], which resets holding flip-flop `line` in every
// group at the next clock edge; otherwise all outputs are low. Combinational.
module line_decoder #(
  parameter int unsigned LINES = spark_pkg::LINES,
  localparam int unsigned LW   = $clog2(LINES)
) (
  input  logic [LW-1:0]    line,
  input  logic             en,
  output logic [LINES-1:0] clr_line
);

  always_comb begin
    clr_line = '0;
    if (en) clr_line[line] = 1'b1;
  end

endmodule
