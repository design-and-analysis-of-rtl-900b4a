// rempty_flag: read state flag (empty).
//
// Works in the read clock domain on Gray pointers. The FIFO is empty when
// the read pointer has caught up with the write pointer, that is when every
// bit of the next read Gray pointer equals the synchronized write Gray
// pointer. The flag is registered; it is set by reset. As the write pointer
// arrives two read clocks late, empty may stay high a little after a write,
// never the other way round.
//
// Ports: r_clk, rst_n, rgray_next, rq2_wgray (write pointer after the
// synchronizer) in; empty out.
module rempty_flag #(
  parameter int unsigned ADDR_W = fifo_pkg::ADDR_W_DEF
) (
  input  logic            r_clk,
  input  logic            rst_n,
  input  logic [ADDR_W:0] rgray_next,
  input  logic [ADDR_W:0] rq2_wgray,
  output logic            empty
);

  always_ff @(posedge r_clk or negedge rst_n) begin
    if (!rst_n) empty <= 1'b1;
    else        empty <= (rgray_next == rq2_wgray);
  end

endmodule
