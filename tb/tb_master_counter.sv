// tb_master_counter: starts the full 15-bit scaler and checks the count in
// every cycle against the cycles elapsed since the start, that the carry
// comes exactly once after 2**15 cycles (1.64 ms at 20 MHz) and that the
// counter then stays stopped; a second start restarts it from zero.
module tb_master_counter;
  localparam int W = 15;
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] count;
  logic running, carry;
  int checks = 0, failures = 0;

  master_counter #(.WIDTH(W)) dut (.clk, .rst_n, .start, .count, .running, .carry);

  always #25 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_once();
    int carries = 0, carry_at = -1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int t = 0; t < 2**W + 20; t++) begin
      if (t < 2**W) begin
        checks++;
        if (!running || count !== W'(t)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d count=%0d running=%b", t, count, running);
        end
      end
      if (carry) begin carries++; carry_at = t; end
      @(negedge clk);
    end
    checks++;
    if (carries != 1 || carry_at != 2**W - 1 || running) begin
      failures++; $display("FAIL carries=%0d at %0d running=%b", carries, carry_at, running);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (running || carry) begin failures++; $display("FAIL runs before start"); end
    run_once();
    run_once();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
