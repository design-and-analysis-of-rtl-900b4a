// delay_ctrl_tb: complete delay corrections.
// Clocks as in the decimal delay test: four sampling clocks (40 ns, rising
// at 5 + 10k ns), a write clock of the same period at a swept offset d,
// and an unrelated 26 ns read clock. The testbench holds a write pointer
// and a read pointer register that takes rptr_load_bin on rptr_load. For
// every run it checks: the phase step and carry for the target phase, a
// single phase_adj_valid strobe, the reloaded read pointer
// wptr - target_int (+1 on carry), cal_ok, the re-measured integer delay,
// and the cal_start to cal_done latency of 6 read clocks. With the write
// clock stopped the run must end by timeout with cal_ok low and the read
// pointer untouched.
module delay_ctrl_tb;
  localparam int ADDR_W = 4, DEPTH = 1 << ADDR_W, N = 4, PW = 2, P = 40;
  logic w_clk = 0, r_clk = 0, rst_n = 0;
  logic [N-1:0] samp_clk = '0;
  logic [ADDR_W:0] rq2_wgray, rbin, target_int = '0, wb = '0;
  logic cal_start = 0;
  logic [PW-1:0] target_phase = '0;
  logic rptr_load, phase_adj_valid, phase_carry, phase_valid, cal_busy, cal_done, cal_ok;
  logic [ADDR_W:0] rptr_load_bin, int_delay_meas;
  logic [PW-1:0] phase_adj, phase_meas;
  int t = 0, d = 0;
  bit w_run = 1;
  int checks = 0, failures = 0, n_carry = 0, n_nocarry = 0;

  delay_ctrl #(.ADDR_W(ADDR_W), .N(N), .PW(PW)) dut (.*);

  assign rq2_wgray = wb ^ (wb >> 1);

  always_ff @(posedge r_clk or negedge rst_n)
    if (!rst_n)         rbin <= '0;
    else if (rptr_load) rbin <= rptr_load_bin;

  always #1 begin
    t++;
    for (int k = 0; k < N; k++) samp_clk[k] <= (((t - 5 - 10 * k) % P + P) % P) < P / 2;
    w_clk <= w_run && ((((t - d) % P + P) % P) < P / 2);
  end
  always #13 r_clk = ~r_clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("d=%0d %s: got %0d expected %0d", d, what, got, exp);
    end
  endtask

  // one correction: returns latency in read clocks and the strobe count
  task automatic run_cal(output int latency, output int strobes);
    latency = 0;
    strobes = 0;
    @(negedge r_clk) cal_start = 1;
    @(posedge r_clk);
    @(negedge r_clk) cal_start = 0;
    while (!cal_done && latency < 100) begin
      @(posedge r_clk);
      latency++;
      #1;
      if (phase_adj_valid) strobes++;
    end
  endtask

  initial begin
    bit [N-1:0] s;
    int exp_idx, lat, strb, exp_carry;
    logic [ADDR_W:0] old_r;
    #30 rst_n = 1;
    for (int j = 0; j < 16; j++) begin
      d = (j * 7 + 2) % P;
      if (d % 10 == 5) d++;
      wb = (ADDR_W+1)'($urandom);
      target_int = (ADDR_W+1)'($urandom_range(1, DEPTH));
      target_phase = PW'(j % N);
      s = '0;
      for (int k = 0; k < N; k++) s[k] = (((5 + 10 * k - d) % P + P) % P) < P / 2;
      exp_idx = 0;
      for (int k = 0; k < N; k++) if (s[k] && !s[(k + N - 1) % N]) exp_idx = k;
      exp_carry = int'(j % N < exp_idx);
      if (exp_carry != 0) n_carry++; else n_nocarry++;
      repeat (12) @(posedge r_clk);
      run_cal(lat, strb);
      check(int'(cal_done), 1, "cal_done");
      check(lat, 6, "cal_start to cal_done latency");
      check(strb, 1, "phase_adj_valid strobes");
      check(int'(cal_ok), 1, "cal_ok");
      check(int'(phase_adj), ((j % N) - exp_idx + N) % N, "phase_adj");
      check(int'(phase_carry), exp_carry, "phase_carry");
      check(int'(rbin), int'((ADDR_W+1)'(wb - target_int + (ADDR_W+1)'(exp_carry))), "reloaded rptr");
      @(posedge r_clk); #1;
      check(int'(int_delay_meas), int'((ADDR_W+1)'(target_int - (ADDR_W+1)'(exp_carry))), "integer delay after correction");
      check(int'(cal_busy), 0, "idle after done");
    end
    check(int'(n_carry > 0 && n_nocarry > 0), 1, "both carry cases exercised");
    // write clock stopped: measurement times out
    w_run = 0;
    repeat (12) @(posedge r_clk);
    old_r = rbin;
    run_cal(lat, strb);
    check(int'(cal_done), 1, "cal_done after timeout");
    check(int'(cal_ok), 0, "cal_ok low after timeout");
    check(strb, 0, "no phase strobe after timeout");
    check(int'(rbin), int'(old_r), "read pointer untouched after timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
