// delay_ctrl: delay judgment module.
//
// Measures and corrects the delay between the write and read sides of the
// FIFO. The delay is split into a decimal part (phase of the write clock
// against the read clock, below one period; decimal_delay) and an integer
// part (number of cells between the pointers; integer_delay). As the
// design prescribes, the decimal part is corrected first and the integer
// part second, since a decimal correction that wraps past a period changes
// the integer delay by one.
//
// A pulse on cal_start runs one correction, all in the read clock domain:
//   MEAS   wait for a stable phase measurement (give up after MEAS_TIMEOUT
//          read clocks: cal_done with cal_ok low, nothing changed);
//   DEC    output the phase step on phase_adj with a one-cycle
//          phase_adj_valid strobe, for an external clock phase shifter, and
//          keep its carry;
//   INT    ask integer_delay to reload the read pointer with
//          wptr - target_int (+1 on carry);
//   LOAD, SETTLE  the read pointer is reloaded, the difference re-measured;
//   CHECK  cal_done pulses for one cycle with cal_ok = delay_ok.
// cal_busy is high from cal_start until cal_done. The state sequence, the
// timeout and the handshake are choices of this design. For the check to
// be exact the write side should be quiet during a correction.
module delay_ctrl #(
  parameter int unsigned ADDR_W       = fifo_pkg::ADDR_W_DEF,
  parameter int unsigned N            = fifo_pkg::N_PHASE,
  parameter int unsigned PW           = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned MEAS_TIMEOUT = 16
) (
  input  logic            r_clk,
  input  logic            rst_n,
  input  logic            w_clk,
  input  logic [N-1:0]    samp_clk,
  input  logic [ADDR_W:0] rq2_wgray,
  input  logic [ADDR_W:0] rbin,
  input  logic            cal_start,
  input  logic [PW-1:0]   target_phase,
  input  logic [ADDR_W:0] target_int,
  output logic            rptr_load,
  output logic [ADDR_W:0] rptr_load_bin,
  output logic [PW-1:0]   phase_adj,
  output logic            phase_adj_valid,
  output logic            phase_carry,
  output logic            phase_valid,
  output logic [PW-1:0]   phase_meas,
  output logic [ADDR_W:0] int_delay_meas,
  output logic            cal_busy,
  output logic            cal_done,
  output logic            cal_ok
);

  import fifo_pkg::*;

  cal_state_t      state;
  logic [PW-1:0]   phase_step;
  logic            carry;
  logic            delay_ok;
  logic            load_req;
  logic [$clog2(MEAS_TIMEOUT+1)-1:0] wait_cnt;

  decimal_delay #(.N(N), .PW(PW)) u_dec (
    .w_clk        (w_clk),
    .samp_clk     (samp_clk),
    .r_clk        (r_clk),
    .rst_n        (rst_n),
    .target_phase (target_phase),
    .phase_valid  (phase_valid),
    .phase_meas   (phase_meas),
    .phase_step   (phase_step),
    .carry        (carry)
  );

  integer_delay #(.ADDR_W(ADDR_W)) u_int (
    .r_clk          (r_clk),
    .rst_n          (rst_n),
    .rq2_wgray      (rq2_wgray),
    .rbin           (rbin),
    .target_int     (target_int),
    .carry          (phase_carry),
    .load_req       (load_req),
    .int_delay_meas (int_delay_meas),
    .load           (rptr_load),
    .load_bin       (rptr_load_bin),
    .delay_ok       (delay_ok)
  );

  always_comb load_req = (state == CAL_INT);

  always_ff @(posedge r_clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= CAL_IDLE;
      wait_cnt        <= '0;
      phase_adj       <= '0;
      phase_adj_valid <= 1'b0;
      phase_carry     <= 1'b0;
      cal_done        <= 1'b0;
      cal_ok          <= 1'b0;
    end else begin
      phase_adj_valid <= 1'b0;
      cal_done        <= 1'b0;
      unique case (state)
        CAL_IDLE: begin
          wait_cnt <= '0;
          if (cal_start) state <= CAL_MEAS;
        end
        CAL_MEAS: begin
          if (phase_valid) begin
            state <= CAL_DEC;
          end else if (32'(wait_cnt) == MEAS_TIMEOUT) begin
            cal_done <= 1'b1;
            cal_ok   <= 1'b0;
            state    <= CAL_IDLE;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        CAL_DEC: begin
          phase_adj       <= phase_step;
          phase_carry     <= carry;
          phase_adj_valid <= 1'b1;
          state           <= CAL_INT;
        end
        CAL_INT:    state <= CAL_LOAD;
        CAL_LOAD:   state <= CAL_SETTLE;
        CAL_SETTLE: state <= CAL_CHECK;
        CAL_CHECK: begin
          cal_done <= 1'b1;
          cal_ok   <= delay_ok;
          state    <= CAL_IDLE;
        end
        default: state <= CAL_IDLE;
      endcase
    end
  end

  always_comb cal_busy = (state != CAL_IDLE);

endmodule
