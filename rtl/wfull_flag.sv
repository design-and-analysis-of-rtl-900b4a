// wfull_flag: write state flag (full).
//
// Works in the write clock domain on Gray pointers, with no conversion back
// to binary. The FIFO is full when the write pointer is exactly one lap
// ahead of the read pointer; in (ADDR_W+1)-bit Gray code that is when the
// two top bits of the write pointer differ from those of the synchronized
// read pointer and all other bits are equal. The flag is computed from the
// next write pointer and registered, so it rises on the same edge that
// stores the last free word. Since the read pointer arrives two write clocks
// late, full may stay high a little after a read frees a cell, never the
// other way round.
//
// Ports: w_clk, rst_n, wgray_next, wq2_rgray (read pointer after the
// synchronizer) in; full out, cleared by reset.
module wfull_flag #(
  parameter int unsigned ADDR_W = fifo_pkg::ADDR_W_DEF
) (
  input  logic            w_clk,
  input  logic            rst_n,
  input  logic [ADDR_W:0] wgray_next,
  input  logic [ADDR_W:0] wq2_rgray,
  output logic            full
);

  localparam logic [ADDR_W:0] TOP2 = {2'b11, {(ADDR_W-1){1'b0}}};

  logic full_next;

  always_comb full_next = (wgray_next == (wq2_rgray ^ TOP2));

  always_ff @(posedge w_clk or negedge rst_n) begin
    if (!rst_n) full <= 1'b0;
    else        full <= full_next;
  end

endmodule
