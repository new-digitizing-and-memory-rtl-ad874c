// tb_line_decoder: checks the one-of-eight decoder for every line with the
// strobe high (one-hot at that line) and low (all zero).
module tb_line_decoder;
  localparam int L = 8;
  logic [2:0] line;
  logic en;
  logic [L-1:0] clr_line;
  int checks = 0, failures = 0;

  line_decoder #(.LINES(L)) dut (.line, .en, .clr_line);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int s = 0; s < L; s++) begin
        line = 3'(s); en = e[0]; #1;
        checks++;
        if (clr_line !== (e[0] ? L'(1) << s : '0)) begin
          failures++; $display("FAIL line=%0d en=%0d out=%b", s, e, clr_line);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
