// decimal_delay: decimal (sub-cycle) delay measurement.
//
// Measures the phase of the write clock against the read clock in steps of
// 1/N of a clock period. N sampling clocks (N = 4, the four-way sampling of
// the design) run at the clock frequency with phases shifted by 1/N period
// each; samp_clk[0] is taken as aligned with the read clock. Each sampling
// clock latches the level of w_clk; the N samples are carried into the read
// clock domain by a two-stage synchronizer. For a write clock of the same
// frequency the sample pattern is a rotated run of ones, and the position i
// at which it rises (sample i high, sample i-1 low, indices modulo N) says
// that the write clock edge lies between sampling phases i-1 and i.
//
// phase_valid is high while the pattern holds exactly one rising position
// and has not changed since the previous read clock. phase_meas is that
// position. phase_step = (target_phase - phase_meas) mod N is the phase
// shift, in 1/N periods, that would bring the write clock edge to the
// wanted phase; carry is high when applying it wraps past a whole period
// (target_phase < phase_meas), which the integer delay must then absorb.
// The shift itself is applied by a clock phase interpolator outside this
// design. The synchronizer, the stability test, the choice of samp_clk[0]
// as the reference and the wrap rule for carry are choices of this design.
//
// Timing: phase_meas and phase_valid are registered on r_clk, about three
// read clocks after the sampled phase settles.
module decimal_delay #(
  parameter int unsigned N  = fifo_pkg::N_PHASE,
  parameter int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          w_clk,
  input  logic [N-1:0]  samp_clk,
  input  logic          r_clk,
  input  logic          rst_n,
  input  logic [PW-1:0] target_phase,
  output logic          phase_valid,
  output logic [PW-1:0] phase_meas,
  output logic [PW-1:0] phase_step,
  output logic          carry
);

  logic [N-1:0] smp;       // w_clk level at each sampling clock edge
  logic [N-1:0] smp_r;     // the same, in the read clock domain
  logic [N-1:0] smp_prev;
  logic [PW-1:0] rise_idx;
  int unsigned   n_rise;

  for (genvar i = 0; i < N; i++) begin : g_sample
    logic s;  // one flip-flop per sampling clock
    always_ff @(posedge samp_clk[i] or negedge rst_n) begin
      if (!rst_n) s <= 1'b0;
      else        s <= w_clk;
    end
    assign smp[i] = s;
  end

  sync_2ff #(.W(N)) u_sync (.clk(r_clk), .rst_n(rst_n), .d(smp), .q(smp_r));

  always_comb begin
    n_rise   = 0;
    rise_idx = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (smp_r[i] && !smp_r[(i + N - 1) % N]) begin
        n_rise   = n_rise + 1;
        rise_idx = PW'(i);
      end
    end
  end

  always_ff @(posedge r_clk or negedge rst_n) begin
    if (!rst_n) begin
      smp_prev    <= '0;
      phase_valid <= 1'b0;
      phase_meas  <= '0;
    end else begin
      smp_prev    <= smp_r;
      phase_valid <= (n_rise == 1) && (smp_r == smp_prev);
      phase_meas  <= rise_idx;
    end
  end

  always_comb begin
    phase_step = PW'((N + 32'(target_phase) - 32'(phase_meas)) % N);
    carry      = (target_phase < phase_meas);
  end

endmodule
