// tb_controller: walks the sequencer through two events with randomised
// durations and checks every state's outputs: start only on a trigger in
// IDLE, recording and detector enable (withheld when the spark counter is
// full), the one-cycle count transfer, advance pulses until the spark carry,
// waiting for the banks, readout until rd_done, and busy from the trigger to the spark carry.
module tb_controller;
  import spark_pkg::*;
  logic clk = 0, rst_n = 0, trigger = 0, scaler_carry = 0, spark_full = 0,
        spark_carry = 0, banks_busy = 0, rd_done = 0;
  state_t state;
  logic start, recording, det_enable, latch_en, advance, busy, rd_active;
  int checks = 0, failures = 0;

  controller dut (.clk, .rst_n, .trigger, .scaler_carry, .spark_full, .spark_carry,
    .banks_busy, .rd_done, .state, .start, .recording, .det_enable, .latch_en,
    .advance, .busy, .rd_active);

  always #25 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_out(string what, logic e_start, e_rec, e_det, e_latch, e_adv, e_busy, e_rd);
    #1;
    checks++;
    if ({start, recording, det_enable, latch_en, advance, busy, rd_active} !==
        {e_start, e_rec, e_det, e_latch, e_adv, e_busy, e_rd}) begin
      failures++;
      $display("FAIL %s: state=%s out=%b%b%b%b%b%b%b", what, state.name(), start, recording,
               det_enable, latch_en, advance, busy, rd_active);
    end
  endtask

  task automatic one_event();
    int n;
    // idle: trigger-free cycles, spurious carries ignored
    repeat (3) begin
      @(negedge clk) scaler_carry = $urandom_range(0, 1); spark_carry = $urandom_range(0, 1);
      expect_out("idle", 0, 0, 0, 0, 0, 0, 0);
    end
    @(negedge clk) scaler_carry = 0; spark_carry = 0; trigger = 1;
    expect_out("trigger", 1, 0, 0, 0, 0, 0, 0);
    @(negedge clk) trigger = 0;
    n = $urandom_range(3, 20);
    for (int i = 0; i < n; i++) begin
      spark_full = (i > n - 3);
      trigger = $urandom_range(0, 1);  // retrigger is ignored
      expect_out("record", 0, 1, !spark_full, 0, 0, 1, 0);
      @(negedge clk);
    end
    trigger = 0; spark_full = 0; scaler_carry = 1;
    expect_out("record end", 0, 1, 1, 0, 0, 1, 0);
    @(negedge clk) scaler_carry = 0;
    expect_out("xfer", 0, 0, 0, 1, 0, 1, 0);
    @(negedge clk);
    n = $urandom_range(1, 20);
    for (int i = 0; i < n; i++) begin
      expect_out("advance", 0, 0, 0, 0, 1, 1, 0);
      @(negedge clk);
    end
    spark_carry = 1;
    expect_out("advance end", 0, 0, 0, 0, 1, 1, 0);
    @(negedge clk) spark_carry = 0; banks_busy = 1;
    repeat (3) begin
      expect_out("drain", 0, 0, 0, 0, 0, 0, 0);
      @(negedge clk);
    end
    banks_busy = 0;
    expect_out("drain end", 0, 0, 0, 0, 0, 0, 0);
    @(negedge clk);
    repeat ($urandom_range(1, 10)) begin
      expect_out("readout", 0, 0, 0, 0, 0, 0, 1);
      @(negedge clk);
    end
    rd_done = 1;
    expect_out("readout end", 0, 0, 0, 0, 0, 0, 1);
    @(negedge clk) rd_done = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    one_event();
    one_event();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
