// fifo_mem: dual-port RAM of the asynchronous FIFO.
//
// One write port in the write clock domain and one read port in the read
// clock domain; the FIFO has no external address lines, the addresses come
// from the write and read pointer controllers. A word is written on the
// rising edge of w_clk when w_inc is high. The read port is registered:
// rdata takes mem[raddr] on the rising edge of r_clk when r_inc is high and
// holds otherwise; it resets to zero. The registered read port and the
// reset value are choices of this design.
//
// Ports: w_clk, w_inc, waddr, wdata (write); r_clk, rst_n, r_inc, raddr,
// rdata (read).
module fifo_mem #(
  parameter int unsigned DATA_W = fifo_pkg::DATA_W_DEF,
  parameter int unsigned ADDR_W = fifo_pkg::ADDR_W_DEF
) (
  input  logic              w_clk,
  input  logic              w_inc,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              r_clk,
  input  logic              rst_n,
  input  logic              r_inc,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge w_clk) begin
    if (w_inc) mem[waddr] <= wdata;
  end

  always_ff @(posedge r_clk or negedge rst_n) begin
    if (!rst_n)     rdata <= '0;
    else if (r_inc) rdata <= mem[raddr];
  end

endmodule
