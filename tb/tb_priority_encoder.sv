// tb_priority_encoder: drives random and single-bit holding patterns into the
// priority encoder and compares the OR outputs, the highest active line and
// valid with a reference computed bit by bit in the testbench.
module tb_priority_encoder;
  localparam int G = 8, L = 8;
  logic [G-1:0][L-1:0] hold;
  logic [L-1:0] line_any;
  logic [2:0]   line;
  logic         valid;
  int checks = 0, failures = 0;

  priority_encoder #(.GROUPS(G), .LINES(L)) dut (.hold, .line_any, .line, .valid);

  task automatic check_one();
    logic [L-1:0] exp_any = '0;
    int exp_line = 0;
    #1;
    for (int j = 0; j < G; j++) for (int i = 0; i < L; i++) if (hold[j][i]) exp_any[i] = 1'b1;
    for (int i = 0; i < L; i++) if (exp_any[i]) exp_line = i;
    checks++;
    if (line_any !== exp_any || valid !== (exp_any != 0) ||
        (exp_any != 0 && line !== 3'(exp_line))) begin
      failures++;
      $display("FAIL hold=%h any=%b/%b line=%0d/%0d valid=%b", hold, line_any, exp_any, line, exp_line, valid);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    hold = '0; check_one();
    for (int j = 0; j < G; j++) for (int i = 0; i < L; i++) begin
      hold = '0; hold[j][i] = 1'b1; check_one();
    end
    repeat (2000) begin
      hold = {$urandom, $urandom};
      // thin out to get sparse patterns as well
      if ($urandom_range(0, 1)) hold &= {$urandom, $urandom} & {$urandom, $urandom};
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
