// integer_delay: integer (whole-cell) delay measurement and correction.
//
// In the read clock domain, turns the synchronized write Gray pointer back
// into binary and measures the integer delay: the number of storage cells
// between the write pointer and the read pointer, int_delay_meas =
// wptr - rptr (modulo 2^(ADDR_W+1)), registered every read clock.
//
// On load_req it computes a new read pointer from the current write
// pointer: wptr - target_int when the decimal correction did not carry, and
// wptr - target_int + 1 when it did. One read clock later it drives load and
// load_bin to the read pointer controller. To verify the correction,
// delay_ok is high while the measured difference equals the difference the
// correction was meant to leave (target_int, less the carry taken at the
// last load request).
//
// Ports: r_clk, rst_n, rq2_wgray (synchronized write pointer, Gray), rbin
// (read pointer, binary), target_int, carry, load_req in; int_delay_meas,
// load, load_bin, delay_ok out. All outputs are registered.
module integer_delay #(
  parameter int unsigned ADDR_W = fifo_pkg::ADDR_W_DEF
) (
  input  logic            r_clk,
  input  logic            rst_n,
  input  logic [ADDR_W:0] rq2_wgray,
  input  logic [ADDR_W:0] rbin,
  input  logic [ADDR_W:0] target_int,
  input  logic            carry,
  input  logic            load_req,
  output logic [ADDR_W:0] int_delay_meas,
  output logic            load,
  output logic [ADDR_W:0] load_bin,
  output logic            delay_ok
);

  logic [ADDR_W:0] wbin_s;    // synchronized write pointer, binary
  logic [ADDR_W:0] diff;
  logic            carry_l;   // carry of the last correction

  // Gray to binary: each binary bit is the XOR of the Gray bits at and above it.
  always_comb begin
    wbin_s[ADDR_W] = rq2_wgray[ADDR_W];
    for (int i = int'(ADDR_W) - 1; i >= 0; i--) wbin_s[i] = wbin_s[i+1] ^ rq2_wgray[i];
    diff = wbin_s - rbin;
  end

  always_ff @(posedge r_clk or negedge rst_n) begin
    if (!rst_n) begin
      int_delay_meas <= '0;
      load           <= 1'b0;
      load_bin       <= '0;
      carry_l        <= 1'b0;
      delay_ok       <= 1'b0;
    end else begin
      int_delay_meas <= diff;
      load           <= load_req;
      if (load_req) begin
        load_bin <= wbin_s - target_int + (ADDR_W+1)'(carry);
        carry_l  <= carry;
      end
      delay_ok <= (diff == target_int - (ADDR_W+1)'(carry_l));
    end
  end

endmodule
