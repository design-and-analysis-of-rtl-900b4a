// rptr_ctrl: read control module.
//
// Keeps the read pointer as an (ADDR_W+1)-bit binary counter that advances
// on a rising edge of r_clk when r_en is high and the FIFO is not empty,
// plus its registered Gray code for the trip to the write clock domain and
// the next Gray value for the empty-flag logic.
//
// The delay-correction logic may overwrite the pointer: when load is high
// the pointer takes load_bin on the next edge and no word is read in that
// cycle. The reload is the design's way of setting the number of cells
// between the write and read pointers (the integer delay). A reload may
// change several Gray bits at once; it is meant to be done while the
// pointers are quiet.
//
// Ports: r_clk, rst_n, r_en, empty, load, load_bin in; r_inc (a word is
// read this cycle), raddr, rbin, rgray, rgray_next out.
module rptr_ctrl #(
  parameter int unsigned ADDR_W = fifo_pkg::ADDR_W_DEF
) (
  input  logic              r_clk,
  input  logic              rst_n,
  input  logic              r_en,
  input  logic              empty,
  input  logic              load,
  input  logic [ADDR_W:0]   load_bin,
  output logic              r_inc,
  output logic [ADDR_W-1:0] raddr,
  output logic [ADDR_W:0]   rbin,
  output logic [ADDR_W:0]   rgray,
  output logic [ADDR_W:0]   rgray_next
);

  logic [ADDR_W:0] rbin_next;

  always_comb begin
    r_inc     = r_en && !empty && !load;
    rbin_next = load ? load_bin : rbin + (ADDR_W+1)'(r_inc);
  end

  gray_conv #(.W(ADDR_W+1)) u_gray (.bin(rbin_next), .gray(rgray_next));

  always_ff @(posedge r_clk or negedge rst_n) begin
    if (!rst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else begin
      rbin  <= rbin_next;
      rgray <= rgray_next;
    end
  end

  assign raddr = rbin[ADDR_W-1:0];

endmodule
