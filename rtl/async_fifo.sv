// async_fifo: asynchronous FIFO with delay control.
//
// Moves 16-bit words from a write clock domain (w_clk) to an unrelated read
// clock domain (r_clk), first in first out, with no external address lines.
// Structure:
//   - fifo_mem: dual-port RAM, 2^ADDR_W words;
//   - wptr_ctrl / rptr_ctrl: write and read pointers, (ADDR_W+1)-bit binary
//     counters also kept in Gray code;
//   - two sync_2ff synchronizers: read pointer into the write domain, write
//     pointer into the read domain, as Gray code so that a pointer caught
//     mid-change is still a valid old or new value;
//   - wfull_flag: full when the Gray pointers differ in their two top bits
//     and agree in the rest; rempty_flag: empty when they are equal;
//   - delay_ctrl: measures the phase of w_clk against the read clock with
//     four phase-shifted sampling clocks (decimal delay), measures the cell
//     count between the pointers (integer delay) and, on cal_start, reloads
//     the read pointer to write pointer - target_int (+1 when the phase
//     correction wraps). The phase correction itself is handed out on
//     phase_adj / phase_adj_valid to a clock phase shifter outside this
//     design.
//
// Interface: writes happen on a rising w_clk edge while w_en is high and
// full is low; a write when full is ignored. data_out is registered: it
// takes the next word on a rising r_clk edge while r_en is high and empty
// is low, and holds otherwise. full rises on the edge that stores the last
// free word; empty is set by reset and rises on the edge that reads the
// last word. A write becomes visible to the reader (empty falls) two to
// three read clocks later; a read frees a cell for the writer two to three
// write clocks later. rst_n is an asynchronous active-low reset for both
// domains; its release should be synchronous to both clocks.
//
// Lint note: rst_n is reported as used both as an asynchronous reset and
// synchronously; the synchronous use is only the 'disable iff' of the
// assertions at the end, which are not hardware, so the warning stands.
//
// The pointer, synchronizer and flag scheme follow the design as described;
// the depth, the registered read port, the reset values and all details of
// the delay correction handshake are choices of this implementation.
module async_fifo #(
  parameter int unsigned DATA_W = fifo_pkg::DATA_W_DEF,
  parameter int unsigned ADDR_W = fifo_pkg::ADDR_W_DEF,
  parameter int unsigned N      = fifo_pkg::N_PHASE,
  parameter int unsigned PW     = (N > 1) ? $clog2(N) : 1
) (
  input  logic              rst_n,
  // write side
  input  logic              w_clk,
  input  logic              w_en,
  input  logic [DATA_W-1:0] data_in,
  output logic              full,
  // read side
  input  logic              r_clk,
  input  logic              r_en,
  output logic [DATA_W-1:0] data_out,
  output logic              empty,
  // delay judgment (read clock domain, except the sampling clocks)
  input  logic [N-1:0]      samp_clk,
  input  logic              cal_start,
  input  logic [PW-1:0]     target_phase,
  input  logic [ADDR_W:0]   target_int,
  output logic [PW-1:0]     phase_adj,
  output logic              phase_adj_valid,
  output logic              phase_carry,
  output logic              phase_valid,
  output logic [PW-1:0]     phase_meas,
  output logic [ADDR_W:0]   int_delay_meas,
  output logic              cal_busy,
  output logic              cal_done,
  output logic              cal_ok
);

  logic              w_inc, r_inc;
  logic [ADDR_W-1:0] waddr, raddr;
  logic [ADDR_W:0]   wgray, wgray_next;
  logic [ADDR_W:0]   rbin, rgray, rgray_next;
  logic [ADDR_W:0]   wq2_rgray, rq2_wgray;
  logic              rptr_load;
  logic [ADDR_W:0]   rptr_load_bin;

  fifo_mem #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_mem (
    .w_clk (w_clk),
    .w_inc (w_inc),
    .waddr (waddr),
    .wdata (data_in),
    .r_clk (r_clk),
    .rst_n (rst_n),
    .r_inc (r_inc),
    .raddr (raddr),
    .rdata (data_out)
  );

  wptr_ctrl #(.ADDR_W(ADDR_W)) u_wptr (
    .w_clk      (w_clk),
    .rst_n      (rst_n),
    .w_en       (w_en),
    .full       (full),
    .w_inc      (w_inc),
    .waddr      (waddr),
    .wgray      (wgray),
    .wgray_next (wgray_next)
  );

  rptr_ctrl #(.ADDR_W(ADDR_W)) u_rptr (
    .r_clk      (r_clk),
    .rst_n      (rst_n),
    .r_en       (r_en),
    .empty      (empty),
    .load       (rptr_load),
    .load_bin   (rptr_load_bin),
    .r_inc      (r_inc),
    .raddr      (raddr),
    .rbin       (rbin),
    .rgray      (rgray),
    .rgray_next (rgray_next)
  );

  // read pointer into the write clock domain
  sync_2ff #(.W(ADDR_W+1)) u_sync_r2w (
    .clk (w_clk), .rst_n (rst_n), .d (rgray), .q (wq2_rgray)
  );

  // write pointer into the read clock domain
  sync_2ff #(.W(ADDR_W+1)) u_sync_w2r (
    .clk (r_clk), .rst_n (rst_n), .d (wgray), .q (rq2_wgray)
  );

  wfull_flag #(.ADDR_W(ADDR_W)) u_full (
    .w_clk      (w_clk),
    .rst_n      (rst_n),
    .wgray_next (wgray_next),
    .wq2_rgray  (wq2_rgray),
    .full       (full)
  );

  rempty_flag #(.ADDR_W(ADDR_W)) u_empty (
    .r_clk      (r_clk),
    .rst_n      (rst_n),
    .rgray_next (rgray_next),
    .rq2_wgray  (rq2_wgray),
    .empty      (empty)
  );

  delay_ctrl #(.ADDR_W(ADDR_W), .N(N), .PW(PW)) u_delay (
    .r_clk           (r_clk),
    .rst_n           (rst_n),
    .w_clk           (w_clk),
    .samp_clk        (samp_clk),
    .rq2_wgray       (rq2_wgray),
    .rbin            (rbin),
    .cal_start       (cal_start),
    .target_phase    (target_phase),
    .target_int      (target_int),
    .rptr_load       (rptr_load),
    .rptr_load_bin   (rptr_load_bin),
    .phase_adj       (phase_adj),
    .phase_adj_valid (phase_adj_valid),
    .phase_carry     (phase_carry),
    .phase_valid     (phase_valid),
    .phase_meas      (phase_meas),
    .int_delay_meas  (int_delay_meas),
    .cal_busy        (cal_busy),
    .cal_done        (cal_done),
    .cal_ok          (cal_ok)
  );

  // The Gray pointers that cross domains change in at most one bit per
  // clock; the only exception is a read pointer reload by delay control.
  a_wgray_one_bit: assert property (@(posedge w_clk) disable iff (!rst_n)
    $countones(wgray ^ $past(wgray)) <= 1);
  a_rgray_one_bit: assert property (@(posedge r_clk) disable iff (!rst_n)
    $past(rptr_load) || $countones(rgray ^ $past(rgray)) <= 1);
  // No write is accepted while full, no read while empty.
  a_no_write_full: assert property (@(posedge w_clk) disable iff (!rst_n)
    full |-> !w_inc);
  a_no_read_empty: assert property (@(posedge r_clk) disable iff (!rst_n)
    empty |-> !r_inc);

endmodule
