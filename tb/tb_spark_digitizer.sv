// tb_spark_digitizer: end-to-end test of the whole digitizer at its default
// size (64 inputs, 15-bit scaler, 1024-word memory), acting as the trigger
// system, the chamber pickups and the computer.
//
// Each event: a set of pickup pulses is generated (random arrivals plus
// deliberate bursts on several lines and on one line in several groups);
// a reference model, written directly from the storing rules (largest
// pending line first, one word per cycle, time = scaler reading, coincidence
// bit when other lines are pending, at most 1023 words), predicts the word
// list. The testbench then triggers the system, plays the pulses, measures
// how long busy stays high (recording 2**15 cycles, one transfer cycle,
// 1024-N advance cycles) and the wait for the banks' last load, and reads the event like
// the computer: the spark count, then each word as two 14-bit halves.
// Pulses outside the recording window must leave no trace.
// Event 1 has 10 arrivals per input (640) plus the bursts; event 2 floods the inputs so
// the spark counter fills, and is read with a request in every cycle.
// Every mechanism is counted and must occur.
module tb_spark_digitizer;
  import spark_pkg::*;

  localparam int NIN     = GROUPS * LINES;
  localparam int REC     = 2 ** SCALER_W;      // recording cycles
  localparam int MEMW    = 2 ** SPARK_W;       // memory words
  localparam int MAXSPK  = MEMW - 1;

  logic clk = 0, rst_n = 0, trigger = 0, rd_req = 0, rd_done = 0;
  logic [GROUPS-1:0][LINES-1:0] pickup = '0;
  logic busy, rd_ready;
  logic [HALF_W-1:0] rd_data;

  spark_digitizer dut (.clk, .rst_n, .trigger, .pickup, .rd_req, .rd_done, .busy, .rd_ready, .rd_data);

  always #25 clk = ~clk;   // 20 MHz

  int checks = 0, failures = 0;
  // mechanism counters
  int n_single = 0, n_coinc = 0, n_multigroup = 0, n_backlog = 0, n_burst4 = 0,
      n_full = 0, n_advance = 0, n_bankshift = 0, n_scaler_ovf = 0, n_spark_ovf = 0;

  logic [NIN-1:0] arrivals [int];   // edge index -> inputs rising there
  logic [WORD_W-1:0] exp_words [$];

  // Watchdog: three events' worth of cycles.
  initial begin
    repeat (3 * (REC + 2 * MEMW + 20000)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (dut.bank_shift != 0) n_bankshift++;

  // ---- stimulus generation ---------------------------------------------
  function automatic void add_arrival(int p, int inp);
    // keep at least one low cycle between pulses of one input
    if (p < 1 || p > REC + 10) return;
    if (arrivals.exists(p - 1) && arrivals[p - 1][inp]) return;
    if (arrivals.exists(p + 1) && arrivals[p + 1][inp]) return;
    if (!arrivals.exists(p)) arrivals[p] = '0;
    arrivals[p][inp] = 1'b1;
  endfunction

  function automatic void gen_event(int per_input, int bursts);
    arrivals.delete();
    for (int inp = 0; inp < NIN; inp++)
      for (int k = 0; k < per_input; k++)
        add_arrival($urandom_range(1, REC - 1), inp);
    for (int b = 0; b < bursts; b++) begin
      int p = $urandom_range(1, REC - 40);
      int kind = b % 3;
      if (kind == 0)        // several lines at once
        for (int k = 0; k < 6; k++) add_arrival(p, $urandom_range(0, NIN - 1));
      else if (kind == 1) begin  // one line in several groups
        int ln = $urandom_range(0, LINES - 1);
        for (int g = 0; g < GROUPS; g += 1 + (b % 2)) add_arrival(p, g * LINES + ln);
      end else              // dense burst: all of one group
        for (int i = 0; i < LINES; i++) add_arrival(p, ($urandom_range(0, GROUPS - 1)) * LINES + i);
    end
    // arrivals at the recording's last edges and just after it
    add_arrival(REC - 1, 5);
    add_arrival(REC, 9);
    add_arrival(REC + 2, 17);
  endfunction

  // Reference: p is the clock edge counted from the trigger edge (p = 0);
  // in the cycle after edge p-1 the scaler reads p-1.
  function automatic void predict();
    logic [NIN-1:0] pend = '0;
    int run = 0;
    exp_words.delete();
    for (int p = 1; p <= REC; p++) begin
      logic [LINES-1:0] lines_on = '0;
      for (int j = 0; j < GROUPS; j++) lines_on |= pend[j*LINES +: LINES];
      if (lines_on != 0 && exp_words.size() < MAXSPK) begin
        int ln = 0, nl = 0;
        logic [GROUPS-1:0] grp;
        spark_word_t w;
        for (int i = 0; i < LINES; i++) if (lines_on[i]) begin ln = i; nl++; end
        for (int j = 0; j < GROUPS; j++) grp[j] = pend[j*LINES + ln];
        w = '0;
        w.coinc = (nl > 1); w.groups = grp; w.line = LINE_W'(ln); w.time_cnt = SCALER_W'(p - 1);
        exp_words.push_back(w);
        if (nl > 1) n_coinc++;
        if ($countones(grp) > 1) n_multigroup++;
        if (nl == 1 && $countones(grp) == 1) n_single++;
        run++;
        if (run == 4) n_burst4++;
        for (int j = 0; j < GROUPS; j++) pend[j*LINES + ln] = 1'b0;
      end else begin
        if (lines_on != 0) n_full++;
        run = 0;
      end
      if (lines_on != 0 && exp_words.size() > 0 && run > 1) n_backlog++;
      if (arrivals.exists(p)) pend |= arrivals[p];
    end
  endfunction

  // ---- one event ----------------------------------------------------------
  task automatic run_event(int per_input, int bursts, bit fast);
    int n, busy_cycles = 0, drain = 0, adv = 0, t = 0;
    gen_event(per_input, bursts);
    predict();
    n = exp_words.size();
    // stray pulses before the trigger
    @(negedge clk) pickup = '1;
    @(negedge clk) pickup = '0;
    @(negedge clk) trigger = 1;        // sampled at edge p = 0
    @(negedge clk) trigger = 0;
    // edge p = t+1 follows
    fork
      begin : drive
        for (int p = 1; p <= REC + 4; p++) begin
          pickup = arrivals.exists(p) ? arrivals[p] : '0;
          @(negedge clk);
        end
        pickup = '0;
      end
      begin : watch
        while (!rd_ready) begin
          if (busy) busy_cycles++;
          else drain++;
          if (dut.advance) adv++;
          if (dut.scaler_carry) n_scaler_ovf++;
          if (dut.spark_carry) n_spark_ovf++;
          @(negedge clk);
          t++;
          if (t > REC + 2 * MEMW + 100) break;
        end
      end
    join
    n_advance += adv;
    // busy: recording, one transfer cycle and 1024-N advance pulses; the
    // last bank load (LOAD_CYCLES-1 cycles) then delays rd_ready
    checks++;
    if (!rd_ready || busy || adv != MEMW - n || busy_cycles != REC + 1 + MEMW - n ||
        drain < 1 || drain > LOAD_CYCLES) begin
      failures++;
      $display("FAIL timing: n=%0d advance=%0d (exp %0d) busy=%0d (exp %0d) drain=%0d ready=%b",
               n, adv, MEMW - n, busy_cycles, REC + 1 + MEMW - n, drain, rd_ready);
    end
    // stray pulses during readout are ignored as well
    @(negedge clk) pickup = '1;
    @(negedge clk) pickup = '0;
    // computer readout; fast: a read request in every clock cycle
    if (fast) @(negedge clk) rd_req = 1;
    begin
      logic [HALF_W-1:0] got;
      do_read(got, fast);
      checks++;
      if (got !== HALF_W'(n)) begin failures++; $display("FAIL spark count %0d exp %0d", got, n); end
      for (int k = 0; k < n; k++) begin
        logic [HALF_W-1:0] lo, hi;
        logic [WORD_W-1:0] w;
        do_read(lo, fast);
        do_read(hi, fast);
        w = {hi, lo};
        checks++;
        if (w !== exp_words[k]) begin
          failures++;
          if (failures < 20) $display("FAIL word %0d: got %h exp %h", k, w, exp_words[k]);
        end
      end
    end
    rd_req = 0;
    @(negedge clk) rd_done = 1;
    @(negedge clk) rd_done = 0;
    @(negedge clk);
    checks++;
    if (rd_ready || busy) begin failures++; $display("FAIL not idle after rd_done"); end
    $display("event: %0d sparks, busy %0d cycles, %0d advance pulses, ready %0d cycles later",
             n, busy_cycles, adv, drain);
  endtask

  task automatic do_read(output logic [HALF_W-1:0] d, input bit fast);
    if (fast) begin
      @(negedge clk) d = rd_data;   // rd_req stays high
      return;
    end
    @(negedge clk) rd_req = 1;
    @(negedge clk) rd_req = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
    d = rd_data;
  endtask

  task automatic need(string what, int cnt);
    checks++;
    if (cnt == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
    else $display("  %-34s %0d", what, cnt);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run_event(10, 30, 0);  // ~640 sparks: 10 per input
    run_event(20, 60, 1);  // more than the memory holds: counter fills;
                           // read back with a request every cycle
    $display("mechanisms:");
    need("isolated spark stored", n_single);
    need("coincidence bit (several lines)", n_coinc);
    need("one line in several groups", n_multigroup);
    need("pending lines stored on later cycles", n_backlog);
    need("4+ stores back to back (interleave)", n_burst4);
    need("sparks refused, counter full", n_full);
    need("scaler overflow ends recording", n_scaler_ovf);
    need("memory advance pulses", n_advance);
    need("spark counter overflow", n_spark_ovf);
    need("bank shifted during readout", n_bankshift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
