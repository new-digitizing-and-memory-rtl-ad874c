// tb_word_latches: random load pulses with random words; a reference
// steering counter checks that each load lands in latches A, B, C, D in
// turn, raises bank_start for that latch only, leaves the other latches
// alone, and that clear sends the next load back to latch A.
module tb_word_latches;
  localparam int B = 4, W = 28;
  logic clk = 0, rst_n = 0, clear = 0, load = 0;
  logic [W-1:0] din = '0;
  logic [B-1:0][W-1:0] latch_q, exp_q = '0;
  logic [B-1:0] bank_start;
  logic [1:0] sel;
  int exp_sel = 0;
  int checks = 0, failures = 0;

  word_latches #(.BANKS(B), .WORD_W(W)) dut (.clk, .rst_n, .clear, .load, .din, .latch_q, .bank_start, .sel);

  always #25 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 49) == 0);
      load  = !clear && $urandom_range(0, 1);
      din   = W'({$urandom});
      #1;
      checks++;
      if (bank_start !== (load ? B'(1) << exp_sel : '0)) begin
        failures++; $display("FAIL c=%0d bank_start=%b exp sel %0d", c, bank_start, exp_sel);
      end
      @(posedge clk);
      if (clear) exp_sel = 0;
      else if (load) begin exp_q[exp_sel] = din; exp_sel = (exp_sel + 1) % B; end
      #1;
      checks++;
      if (latch_q !== exp_q) begin
        failures++; $display("FAIL c=%0d latches differ", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
