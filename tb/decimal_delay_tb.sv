// decimal_delay_tb: phase measurement against the four sampling clocks.
// All clocks are built from a 1 ns tick. The sampling clocks have a 40 ns
// period and rise at 5 + 10k ns (k = 0..3); the write clock has the same
// period and rises at an offset d that the test sweeps; the read clock
// (26 ns) is unrelated. For each d the expected samples, and from them the
// rising position, the phase step and the carry for every target phase,
// are worked out here. With the write clock stopped no valid phase may be
// reported.
module decimal_delay_tb;
  localparam int N = 4, PW = 2, P = 40;
  logic w_clk = 0, r_clk = 0, rst_n = 0;
  logic [N-1:0] samp_clk = '0;
  logic [PW-1:0] target_phase = '0;
  logic phase_valid, carry;
  logic [PW-1:0] phase_meas, phase_step;
  int t = 0, d = 0;
  bit w_run = 1;
  int checks = 0, failures = 0;
  int offsets[10] = '{0, 2, 8, 12, 17, 21, 26, 29, 33, 38};

  decimal_delay #(.N(N), .PW(PW)) dut (.*);

  always #1 begin
    t++;
    for (int k = 0; k < N; k++) samp_clk[k] <= (((t - 5 - 10 * k) % P + P) % P) < P / 2;
    w_clk <= w_run && ((((t - d) % P + P) % P) < P / 2);
  end
  always #13 r_clk = ~r_clk;

  initial begin
    #200000;
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

  initial begin
    bit [N-1:0] s;
    int exp_idx;
    #30 rst_n = 1;
    foreach (offsets[j]) begin
      d = offsets[j];
      s = '0;
      for (int k = 0; k < N; k++) s[k] = (((5 + 10 * k - d) % P + P) % P) < P / 2;
      exp_idx = -1;
      for (int k = 0; k < N; k++) if (s[k] && !s[(k + N - 1) % N]) exp_idx = k;
      repeat (12) @(posedge r_clk);
      #1;
      check(int'(phase_valid), 1, "phase_valid");
      check(int'(phase_meas), exp_idx, "phase_meas");
      for (int tg = 0; tg < N; tg++) begin
        target_phase = PW'(tg);
        #1;
        check(int'(phase_step), (tg - exp_idx + N) % N, "phase_step");
        check(int'(carry), int'(tg < exp_idx), "carry");
      end
    end
    // stopped write clock: every sample low, no valid phase
    w_run = 0;
    repeat (12) @(posedge r_clk);
    #1;
    check(int'(phase_valid), 0, "phase_valid with stopped write clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
