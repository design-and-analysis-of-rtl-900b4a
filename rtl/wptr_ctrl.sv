// wptr_ctrl: write control module.
//
// Keeps the write pointer as an (ADDR_W+1)-bit binary counter that advances
// on a rising edge of w_clk when w_en is high and the FIFO is not full. The
// low ADDR_W bits address the RAM; the extra top bit tells a full FIFO
// (pointers one lap apart) from an empty one. The pointer is also held in
// Gray code, registered, for the trip to the read clock domain, and the
// next Gray value goes to the full-flag logic.
//
// Ports: w_clk, rst_n (asynchronous, active low), w_en, full in;
// w_inc (a write happens this cycle), waddr, wgray, wgray_next out.
module wptr_ctrl #(
  parameter int unsigned ADDR_W = fifo_pkg::ADDR_W_DEF
) (
  input  logic              w_clk,
  input  logic              rst_n,
  input  logic              w_en,
  input  logic              full,
  output logic              w_inc,
  output logic [ADDR_W-1:0] waddr,
  output logic [ADDR_W:0]   wgray,
  output logic [ADDR_W:0]   wgray_next
);

  logic [ADDR_W:0] wbin, wbin_next;

  always_comb begin
    w_inc     = w_en && !full;
    wbin_next = wbin + (ADDR_W+1)'(w_inc);
  end

  gray_conv #(.W(ADDR_W+1)) u_gray (.bin(wbin_next), .gray(wgray_next));

  always_ff @(posedge w_clk or negedge rst_n) begin
    if (!rst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else begin
      wbin  <= wbin_next;
      wgray <= wgray_next;
    end
  end

  assign waddr = wbin[ADDR_W-1:0];

endmodule
