// rempty_flag_tb: empty must be set by reset, and afterwards equal, one
// clock edge later, whether the next read pointer equals the synchronized
// write pointer. Pointers are random, often equal or one apart.
module rempty_flag_tb;
  localparam int unsigned ADDR_W = 4, DEPTH = 1 << ADDR_W;
  logic r_clk = 0, rst_n = 0, empty;
  logic [ADDR_W:0] rgray_next = '0, rq2_wgray = '1;
  logic [ADDR_W:0] wb, rb;
  logic exp_empty;
  int checks = 0, failures = 0, n_empty = 0;

  rempty_flag #(.ADDR_W(ADDR_W)) dut (.*);

  function automatic logic [ADDR_W:0] to_gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  always #5 r_clk = ~r_clk;

  initial begin
    repeat (5000) @(posedge r_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (empty !== 1'b1) begin failures++; $display("empty not set by reset"); end
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge r_clk);
      rb = (ADDR_W+1)'($urandom);
      wb = rb + (ADDR_W+1)'($urandom_range(0, 2) == 0 ? $urandom_range(0, 2 * DEPTH - 1)
                                                       : $urandom_range(0, 1));
      rgray_next = to_gray(rb);
      rq2_wgray  = to_gray(wb);
      exp_empty  = (wb == rb);
      @(posedge r_clk); #1;
      checks++;
      if (exp_empty) n_empty++;
      if (empty !== exp_empty) begin
        failures++;
        $display("w=%0d r=%0d: empty %b expected %b", wb, rb, empty, exp_empty);
      end
    end
    checks++;
    if (n_empty == 0) begin failures++; $display("empty never expected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
