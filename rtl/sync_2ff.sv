// sync_2ff: two-stage synchronizer.
//
// Carries a multi-bit Gray-coded pointer into another clock domain through
// two flip-flops in the destination clock. The first stage may go
// metastable; the second gives it one full destination clock period to
// resolve, which the design rates as enough (a third stage costs more than
// it gains). Because only one bit of a Gray pointer changes per step, the
// synchronized value is always either the old or the new pointer.
//
// Timing: q follows d after two rising edges of clk. rst_n (active low,
// asynchronous) clears both stages.
module sync_2ff #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
