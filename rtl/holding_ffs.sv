// holding_ffs: the 64 holding flip-flops at the pickup inputs, arranged as
// GROUPS groups of LINES inputs. A rising edge on pickup[j][i] sets
// hold[j][i] and it stays set until the one-of-eight decoder clears line i
// (clr_line[i]) in every group at once, after that line has been stored.
// A new arrival in the same cycle as the clear wins, so no spark is lost.
// While enable is low (outside the recording period) all flip-flops are held
// clear and arrivals are ignored.
//
// Interface: pickup is sampled on every clk edge (inputs are taken to be
// synchronous, discriminated logic pulses); hold is registered and changes
// one cycle after the edge is seen. Edge detection and the set-wins rule are
// this design's choices; grouping and line-wise reset follow the original.
module holding_ffs #(
  parameter int unsigned GROUPS = spark_pkg::GROUPS,
  parameter int unsigned LINES  = spark_pkg::LINES
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          enable,
  input  logic [GROUPS-1:0][LINES-1:0]  pickup,
  input  logic [LINES-1:0]              clr_line,
  output logic [GROUPS-1:0][LINES-1:0]  hold
);

  logic [GROUPS-1:0][LINES-1:0] pickup_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pickup_q <= '0;
      hold     <= '0;
    end else begin
      pickup_q <= pickup;
      for (int j = 0; j < GROUPS; j++) begin
        for (int i = 0; i < LINES; i++) begin
          if (!enable)
            hold[j][i] <= 1'b0;
          else if (pickup[j][i] && !pickup_q[j][i])
            hold[j][i] <= 1'b1;
          else if (clr_line[i])
            hold[j][i] <= 1'b0;
        end
      end
    end
  end

endmodule
