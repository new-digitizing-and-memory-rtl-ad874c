// spark_counter: the spark counter and its latch. During recording it counts
// stored sparks (inc). latch_en copies the count into the latch, which keeps
// the number of sparks for the computer. The controller then pulses inc once
// per clock to advance the memory; carry is high in the cycle whose increment
// wraps the counter from all ones to zero. Starting from N sparks, carry
// therefore comes on the (2**WIDTH - N)th advance pulse, after exactly
// 2**WIDTH words have entered the memory in total. clear resets the counter
// (not the latch) at the trigger. full tells the controller that one more
// spark would wrap the counter; refusing sparks then is this design's choice.
module spark_counter #(
  parameter int unsigned WIDTH = spark_pkg::SPARK_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             inc,
  input  logic             latch_en,
  output logic [WIDTH-1:0] count,
  output logic [WIDTH-1:0] latched,
  output logic             full,
  output logic             carry
);

  assign full  = &count;
  assign carry = inc && full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      latched <= '0;
    end else begin
      if (clear)    count <= '0;
      else if (inc) count <= count + WIDTH'(1);
      if (latch_en) latched <= count;
    end
  end

endmodule
