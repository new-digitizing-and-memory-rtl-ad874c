// tb_sr_bank: one full-size bank (28 x 256). Words are pushed at the highest
// rate the bank allows, one start every LOAD_CYCLES = 4 cycles (5 MHz at a
// 20-MHz clock). Checks: busy lasts exactly LOAD_CYCLES-1 cycles after
// start; the output does not move prev_out the shift edge; after 256 pushes
// the first word is at the output, and every later push brings out the
// word pushed 256 places earlier.
module tb_sr_bank;
  localparam int W = 28, D = 256, LC = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] din = '0, dout;
  logic busy;
  logic [W-1:0] pushed[$];
  int checks = 0, failures = 0;

  sr_bank #(.WIDTH(W), .DEPTH(D), .LOAD_CYCLES(LC)) dut (.clk, .rst_n, .start, .din, .busy, .dout);

  always #25 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // back-to-back pushes: a start every LC cycles
    for (int k = 0; k < 3 * D; k++) begin
      logic [W-1:0] prev_out;
      automatic int busy_cycles = 0;
      if (k == 0) @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL busy prev_out start %0d", k); end
      start = 1; din = W'({$urandom});
      pushed.push_back(din);
      prev_out = dout;
      @(negedge clk) start = 0;
      // din must be held by the word latch until the shift: keep it here
      while (busy) begin
        busy_cycles++;
        if (busy_cycles <= LC - 1) begin
          checks++;
          if (dout !== prev_out && k >= D) begin failures++; $display("FAIL early shift %0d", k); end
        end
        @(negedge clk);
        if (busy_cycles > 10) break;
      end
      checks++;
      if (busy_cycles != LC - 1) begin failures++; $display("FAIL busy %0d cycles", busy_cycles); end
      if (k >= D - 1) begin
        checks++;
        if (dout !== pushed[k - (D - 1)]) begin
          failures++; $display("FAIL k=%0d dout=%h exp=%h", k, dout, pushed[k - (D - 1)]);
        end
      end
      din = W'({$urandom});  // the bank must have taken its word already
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
