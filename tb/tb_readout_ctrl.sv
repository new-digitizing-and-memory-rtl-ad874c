// tb_readout_ctrl: fills four model banks with random words, activates the
// readout and issues read requests like the computer. Checks the order
// spark count, bank A low half, bank A high half, bank B low half, ...;
// that a bank is shifted (bank_shift pulse) exactly when the readout moves
// past it; and that dropping active returns FF2, FF3 and the counter to
// their initial state. The model banks shift on bank_shift.
module tb_readout_ctrl;
  localparam int B = 4, W = 28, H = 14, S = 10, NW = 20;
  logic clk = 0, rst_n = 0, active = 0, rd_req = 0;
  logic [S-1:0] spark_latch;
  logic [B-1:0][W-1:0] bank_q;
  logic [B-1:0] bank_shift;
  logic [H-1:0] rd_data;
  logic ff2, ff3;
  logic [1:0] rsel;
  logic [W-1:0] words [NW];
  int bank_pos [B];
  int shifts [B];
  int checks = 0, failures = 0;

  readout_ctrl #(.BANKS(B), .WORD_W(W), .HALF_W(H), .SPARK_W(S)) dut (
    .clk, .rst_n, .active, .rd_req, .spark_latch, .bank_q, .bank_shift, .rd_data, .ff2, .ff3, .rsel);

  always #25 clk = ~clk;

  // Model banks: bank k holds words k, k+4, ...; a shift moves to the next one.
  always_comb
    for (int k = 0; k < B; k++)
      bank_q[k] = (bank_pos[k] * B + k < NW) ? words[bank_pos[k] * B + k] : '0;

  always @(posedge clk)
    for (int k = 0; k < B; k++)
      if (bank_shift[k]) begin bank_pos[k]++; shifts[k]++; end

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic request(input logic [H-1:0] exp, input string what);
    @(negedge clk) rd_req = 1;
    @(negedge clk) rd_req = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    checks++;
    if (rd_data !== exp) begin
      failures++; $display("FAIL %s: got %h exp %h", what, rd_data, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < B; k++) begin bank_pos[k] = 0; shifts[k] = 0; end
    for (int n = 0; n < NW; n++) words[n] = W'({$urandom});
    spark_latch = S'(NW);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) active = 1;
    @(negedge clk);
    checks++;
    if (ff2 || ff3) begin failures++; $display("FAIL flip-flops not clear"); end
    request(H'(NW), "spark count");
    for (int n = 0; n < NW; n++) begin
      request(words[n][H-1:0], $sformatf("word %0d low", n));
      request(words[n][W-1:H], $sformatf("word %0d high", n));
    end
    // the four banks were each shifted once per word read from them, except
    // the bank of the last word, which is still being read
    for (int k = 0; k < B; k++) begin
      automatic int exp_shifts = (NW - 1 - k) / B + ((NW - 1 - k) >= 0 ? 1 : 0);
      if (k == (NW - 1) % B) exp_shifts--;
      checks++;
      if (shifts[k] != exp_shifts) begin
        failures++; $display("FAIL bank %0d shifted %0d times, exp %0d", k, shifts[k], exp_shifts);
      end
    end
    @(negedge clk) active = 0;
    @(negedge clk);
    checks++;
    if (ff2 || ff3 || rsel != 0) begin failures++; $display("FAIL not cleared by inactive"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
