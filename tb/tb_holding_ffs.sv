// tb_holding_ffs: random pickup pulses, line clears and enable changes on
// the full 8x8 array; a cycle-by-cycle reference model (rising edge sets,
// set wins over clear, disabled means clear) is compared every cycle.
// Also checks directly that a pickup held high sets its flip-flop only once.
module tb_holding_ffs;
  localparam int G = 8, L = 8;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [G-1:0][L-1:0] pickup = '0, hold, exp_hold = '0, pq = '0;
  logic [L-1:0] clr_line = '0;
  int checks = 0, failures = 0;

  holding_ffs #(.GROUPS(G), .LINES(L)) dut (.clk, .rst_n, .enable, .pickup, .clr_line, .hold);

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
      enable   = ($urandom_range(0, 19) != 0);
      pickup   = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      clr_line = L'($urandom) & L'($urandom);
      @(posedge clk);
      for (int j = 0; j < G; j++) for (int i = 0; i < L; i++) begin
        if (!enable) exp_hold[j][i] = 0;
        else if (pickup[j][i] && !pq[j][i]) exp_hold[j][i] = 1;
        else if (clr_line[i]) exp_hold[j][i] = 0;
      end
      pq = pickup;
      #1;
      checks++;
      if (hold !== exp_hold) begin
        failures++; $display("FAIL cycle %0d hold=%h exp=%h", c, hold, exp_hold);
      end
    end
    // A level held for many cycles is one arrival: after clearing it stays clear.
    @(negedge clk); enable = 1; clr_line = '0; pickup = '0;
    @(negedge clk); pickup[3][5] = 1'b1;
    @(negedge clk); clr_line[5] = 1'b1;
    @(negedge clk); clr_line = '0;
    repeat (3) @(negedge clk);
    checks++;
    if (hold[3][5] !== 1'b0) begin failures++; $display("FAIL level re-set the flip-flop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
