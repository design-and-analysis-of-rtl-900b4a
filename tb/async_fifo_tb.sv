// async_fifo_tb: end-to-end test of the asynchronous FIFO at its default
// size (16-bit words, 16 entries).
//
// The write clock (20 ns) and the four sampling clocks (20 ns, rising at
// 2 + 5k ns) come from a 1 ns tick; the write clock rises at 13 ns into each
// period at first; the testbench's model of the clock phase shifter moves it
// when a correction asks for it. The read clock (34 ns) is unrelated. A scoreboard queue takes
// every word accepted at a write edge (w_en high, full low) and must match
// every word delivered at a read edge (r_en high, empty low).
//
// Phases: reset values; fill until full with writes continuing (blocked
// writes); drain until empty with reads continuing (blocked reads); random
// traffic in both domains long enough to wrap the pointers many times; two
// delay corrections on a quiet FIFO holding 12 words, one whose phase step
// carries and one that does not, after which the FIFO must hold exactly
// the last (target_int - carry) words written, and the phase measured after
// the modelled phase shift must equal the target phase. Each mechanism is counted
// and a mechanism that never happened is a failure.
module async_fifo_tb;
  import fifo_pkg::*;
  localparam int DATA_W = DATA_W_DEF, ADDR_W = ADDR_W_DEF, DEPTH = 1 << ADDR_W;
  localparam int N = N_PHASE, PW = 2, P = 20;
  int wofs = 13;  // write clock rising edge within the period, ns

  logic rst_n = 0, w_clk = 0, r_clk = 0, w_en = 0, r_en = 0;
  logic [DATA_W-1:0] data_in = '0, data_out;
  logic full, empty;
  logic [N-1:0] samp_clk = '0;
  logic cal_start = 0;
  logic [PW-1:0] target_phase = '0;
  logic [ADDR_W:0] target_int = '0;
  logic [PW-1:0] phase_adj, phase_meas;
  logic phase_adj_valid, phase_carry, phase_valid, cal_busy, cal_done, cal_ok;
  logic [ADDR_W:0] int_delay_meas;

  async_fifo dut (.*);

  int t = 0;
  always #1 begin
    t++;
    for (int k = 0; k < N; k++) samp_clk[k] <= (((t - 2 - 5 * k) % P + P) % P) < P / 2;
    w_clk <= ((((t - wofs) % P + P) % P) < P / 2);
  end
  always #17 r_clk = ~r_clk;

  // Ideal model of the external clock phase shifter: each phase_adj_valid
  // strobe delays the write clock by phase_adj quarter periods.
  int n_shifts = 0;
  always @(posedge r_clk) if (rst_n && phase_adj_valid) begin
    wofs = (wofs + int'(phase_adj) * (P / N)) % P;
    n_shifts++;
  end

  int checks = 0, failures = 0;
  int n_writes = 0, n_reads = 0, n_full = 0, n_wblocked = 0, n_empty_after_data = 0;
  int n_rblocked = 0, n_cal_carry = 0, n_cal_nocarry = 0, n_concurrent = 0;
  logic [DATA_W-1:0] sb[$];
  logic [DATA_W-1:0] exp_word;
  logic pending = 0;
  bit was_full = 0;

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write-side monitor
  always @(posedge w_clk) if (rst_n) begin
    if (w_en && !full) begin
      sb.push_back(data_in);
      n_writes++;
    end
    if (w_en && full) n_wblocked++;
    if (full && !was_full) n_full++;
    was_full = full;
  end

  // read-side monitor: data_out is checked half a read clock later
  always @(posedge r_clk) if (rst_n) begin
    if (r_en && !empty) begin
      if (sb.size() == 0) begin
        checks++; failures++;
        $display("%0t read with empty scoreboard", $time);
      end else begin
        exp_word = sb.pop_front();
        pending = 1;
        n_reads++;
        if (w_en && !full) n_concurrent++;
      end
    end
    if (r_en && empty) n_rblocked++;
  end
  always @(negedge r_clk) if (pending) begin
    pending = 0;
    check(int'(data_out), int'(exp_word), "data_out");
  end

  task automatic wait_w(input int n);
    repeat (n) @(negedge w_clk);
  endtask
  task automatic wait_r(input int n);
    repeat (n) @(negedge r_clk);
  endtask

  // one delay correction on a quiet FIFO; returns the expected carry
  task automatic correction(input int tgt_phase, input int tgt_int);
    int exp_carry, keep, lat, meas0;
    check(int'(phase_valid), 1, "phase measurement valid");
    meas0 = int'(phase_meas);
    exp_carry = int'(tgt_phase < meas0);
    @(negedge r_clk);
    target_phase = PW'(tgt_phase);
    target_int   = (ADDR_W+1)'(tgt_int);
    cal_start    = 1;
    @(negedge r_clk) cal_start = 0;
    lat = 0;
    while (!cal_done && lat < 50) begin
      @(negedge r_clk);
      lat++;
    end
    check(int'(cal_done), 1, "correction finished");
    check(int'(cal_ok), 1, "correction verified");
    check(int'(phase_carry), exp_carry, "phase carry");
    check(int'(phase_adj), (tgt_phase - meas0 + N) % N, "phase step");
    if (exp_carry != 0) n_cal_carry++; else n_cal_nocarry++;
    wait_r(2);
    keep = tgt_int - exp_carry;
    check(int'(int_delay_meas), keep, "integer delay after correction");
    // after the phase shift the measurement must read the target phase
    wait_r(12);
    check(int'(phase_valid), 1, "phase valid after shift");
    check(int'(phase_meas), tgt_phase, "phase reached the target after shift");
    // the FIFO now holds the last keep words written
    while (sb.size() > keep) void'(sb.pop_front());
  endtask

  initial begin
    int cnt;
    logic [DATA_W-1:0] next_data = 16'o000100;
    #50;
    check(int'(empty), 1, "empty after reset");
    check(int'(full), 0, "full after reset");
    check(int'(data_out), 0, "data_out after reset");
    @(negedge w_clk) rst_n = 1;
    @(negedge r_clk);

    // fill with writes continuing past full
    cnt = 0;
    for (int i = 0; i < DEPTH + 6; i++) begin
      @(negedge w_clk);
      if (i == DEPTH) check(int'(full), 1, "full right after 16 writes");
      if (i > 0 && i < DEPTH) check(int'(full), 0, "not full before 16 writes");
      w_en = 1;
      data_in = next_data;
      next_data++;
    end
    @(negedge w_clk) w_en = 0;
    check(n_writes, DEPTH, "words accepted when filling");
    check(int'(full), 1, "full held");

    // drain with reads continuing past empty
    wait_r(3);
    r_en = 1;
    wait_r(DEPTH + 8);
    r_en = 0;
    wait_r(3);
    check(n_reads, DEPTH, "words read when draining");
    check(int'(empty), 1, "empty after drain");
    check(int'(full), 0, "full cleared after drain");

    // write into the empty FIFO: empty must fall within 2..4 read clocks
    @(negedge w_clk) begin w_en = 1; data_in = next_data; next_data++; end
    @(negedge w_clk) w_en = 0;
    cnt = 0;
    while (empty && cnt < 10) begin @(posedge r_clk); cnt++; #1; end
    checks++;
    if (cnt < 2 || cnt > 4) begin
      failures++;
      $display("empty fell after %0d read clocks", cnt);
    end else n_empty_after_data++;

    // random traffic in both domains
    fork
      begin
        for (int i = 0; i < 3000; i++) begin
          @(negedge w_clk);
          w_en = ($urandom_range(0, 99) < ((i / 500) % 2 ? 80 : 45));
          data_in = next_data;
          if (w_en) next_data++;
        end
        @(negedge w_clk) w_en = 0;
      end
      begin
        for (int i = 0; i < 1800; i++) begin
          @(negedge r_clk);
          r_en = ($urandom_range(0, 99) < ((i / 300) % 2 ? 40 : 90));
        end
        @(negedge r_clk) r_en = 0;
      end
    join
    // drain what is left
    wait_r(4);
    r_en = 1;
    while (!empty || sb.size() != 0) begin
      @(negedge r_clk);
      if (n_reads > 100000) break;
    end
    wait_r(2);
    r_en = 0;
    wait_r(2);
    check(sb.size(), 0, "scoreboard empty after drain");

    // delay corrections: 12 words in a quiet FIFO, then two targets
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 12; i++) begin
        @(negedge w_clk);
        w_en = 1; data_in = next_data; next_data++;
      end
      @(negedge w_clk) w_en = 0;
      wait_w(2);
      wait_r(6);
      check(int'(int_delay_meas), 12, "integer delay before correction");
      // target 0 is below the measured phase (3 at first): carry;
      // target N-1 is never below it: no carry
      correction(c == 0 ? 0 : N - 1,
                 c == 0 ? 6 : 9);
      wait_w(4);
      // read out what the correction kept
      r_en = 1;
      while (!empty || sb.size() != 0) begin
        @(negedge r_clk);
        if (n_reads > 100000) break;
      end
      wait_r(2);
      r_en = 0;
      wait_r(2);
      check(sb.size(), 0, "scoreboard empty after correction read-out");
      check(int'(empty), 1, "empty after correction read-out");
    end

    // every mechanism must have happened
    check(int'(n_full > 0), 1, "full reached");
    check(int'(n_wblocked > 0), 1, "writes blocked while full");
    check(int'(n_rblocked > 0), 1, "reads blocked while empty");
    check(int'(n_empty_after_data > 0), 1, "empty released after a write");
    check(int'(n_writes > 4 * 2 * DEPTH), 1, "pointers wrapped several times");
    check(int'(n_concurrent > 0), 1, "simultaneous reads and writes");
    check(int'(n_cal_carry > 0), 1, "correction with carry");
    check(int'(n_cal_nocarry > 0), 1, "correction without carry");
    check(int'(n_shifts == 2), 1, "two phase steps applied");
    $display("writes=%0d reads=%0d full=%0d wblocked=%0d rblocked=%0d concurrent=%0d cal_carry=%0d cal_nocarry=%0d",
             n_writes, n_reads, n_full, n_wblocked, n_rblocked, n_concurrent, n_cal_carry, n_cal_nocarry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
