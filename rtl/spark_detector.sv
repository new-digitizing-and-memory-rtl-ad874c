// spark_detector: gives the store strobe. Whenever any input of the priority
// encoder is active and the controller enables detection (recording, and
// memory not full) it raises store for one clock cycle; because the stored
// line is cleared at that edge, the strobe fires again on the next cycle if
// other lines remain active, so coincident sparks are stored one per 50-ns
// cycle. Combinational; the clock edge at which store is high is the store.
module spark_detector #(
  parameter int unsigned LINES = spark_pkg::LINES
) (
  input  logic [LINES-1:0] line_any,
  input  logic             enable,
  output logic             store
);

  assign store = enable && (|line_any);

endmodule
