// tb_coinc_comparator: exhaustively checks that the coincidence bit is set
// exactly when two or more OR outputs are active (population count > 1).
module tb_coinc_comparator;
  localparam int L = 8;
  logic [L-1:0] line_any;
  logic coinc;
  int checks = 0, failures = 0;

  coinc_comparator #(.LINES(L)) dut (.line_any, .coinc);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 2**L; v++) begin
      automatic int n = 0;
      line_any = L'(v); #1;
      for (int i = 0; i < L; i++) n += (v >> i) & 1;
      checks++;
      if (coinc !== (n > 1)) begin
        failures++; $display("FAIL any=%b coinc=%b", line_any, coinc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
