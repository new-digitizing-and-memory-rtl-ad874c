// tb_spark_counter: counts a random number N of sparks, latches the count,
// then gives advance pulses and checks that the carry comes on pulse
// 2**10 - N (so N + advances = 1024 memory words), that the latch keeps N
// and that full rises at all ones. Repeats for several N including 0 and
// the largest count.
module tb_spark_counter;
  localparam int W = 10;
  logic clk = 0, rst_n = 0, clear = 0, inc = 0, latch_en = 0;
  logic [W-1:0] count, latched;
  logic full, carry;
  int checks = 0, failures = 0;

  spark_counter #(.WIDTH(W)) dut (.clk, .rst_n, .clear, .inc, .latch_en, .count, .latched, .full, .carry);

  always #25 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic event_with(int n);
    int pulses = 0;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int k = 0; k < n; k++) begin
      inc = 1; @(negedge clk);
      if ($urandom_range(0, 2) == 0) begin inc = 0; @(negedge clk); end
    end
    inc = 0;
    checks++;
    if (count !== W'(n) || full !== (n == 2**W - 1)) begin
      failures++; $display("FAIL count=%0d n=%0d full=%b", count, n, full);
    end
    latch_en = 1; @(negedge clk); latch_en = 0;
    inc = 1;
    forever begin
      pulses++;
      #1;
      if (carry) break;
      @(negedge clk);
      if (pulses > 2**W + 2) break;
    end
    @(negedge clk) inc = 0;
    checks++;
    if (pulses != 2**W - n || latched !== W'(n) || count !== '0) begin
      failures++; $display("FAIL n=%0d pulses=%0d latched=%0d count=%0d", n, pulses, latched, count);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    event_with(0);
    event_with(1);
    event_with(640);
    event_with(2**W - 1);
    repeat (5) event_with($urandom_range(0, 2**W - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
