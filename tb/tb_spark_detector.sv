// tb_spark_detector: checks that the store strobe is high exactly when the
// detector is enabled and at least one OR output is active.
module tb_spark_detector;
  localparam int L = 8;
  logic [L-1:0] line_any;
  logic enable, store;
  int checks = 0, failures = 0;

  spark_detector #(.LINES(L)) dut (.line_any, .enable, .store);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 2**L; v++) begin
        line_any = L'(v); enable = e[0]; #1;
        checks++;
        if (store !== (e == 1 && v != 0)) begin
          failures++; $display("FAIL any=%b en=%0d store=%b", line_any, e, store);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
