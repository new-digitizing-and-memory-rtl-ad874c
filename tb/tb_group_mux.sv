// tb_group_mux: for random holding patterns and every line select, checks
// that group bit j equals holding flip-flop [j][line].
module tb_group_mux;
  localparam int G = 8, L = 8;
  logic [G-1:0][L-1:0] hold;
  logic [2:0] line;
  logic [G-1:0] groups;
  int checks = 0, failures = 0;

  group_mux #(.GROUPS(G), .LINES(L)) dut (.hold, .line, .groups);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (300) begin
      hold = {$urandom, $urandom};
      for (int s = 0; s < L; s++) begin
        logic [G-1:0] exp;
        line = 3'(s); #1;
        for (int j = 0; j < G; j++) exp[j] = ((hold >> (j*L + s)) & 1) != 0;
        checks++;
        if (groups !== exp) begin
          failures++; $display("FAIL hold=%h line=%0d groups=%b exp=%b", hold, s, groups, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
