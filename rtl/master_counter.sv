// master_counter: the 20-MHz time scaler. A start pulse (the chamber
// trigger) clears it and gates the clock into it; it then counts every clock
// cycle, so count is the time since the trigger in 50-ns units and is what a
// store writes into memory. When it reaches all ones, carry is high for that
// cycle and at the next edge the counter wraps to zero and stops: the
// overflow ends the recording period (2**WIDTH cycles, 1.64 ms at the
// original 15 bits). Timing: the cycle after the start edge reads 0.
module master_counter #(
  parameter int unsigned WIDTH = spark_pkg::SCALER_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic [WIDTH-1:0] count,
  output logic             running,
  output logic             carry
);

  assign carry = running && (&count);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      running <= 1'b0;
    end else if (start) begin
      count   <= '0;
      running <= 1'b1;
    end else if (running) begin
      count <= count + WIDTH'(1);
      if (carry) running <= 1'b0;
    end
  end

endmodule
