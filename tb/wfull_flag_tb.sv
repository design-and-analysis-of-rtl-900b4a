// wfull_flag_tb: full must be set by the clock edge after a next-write
// pointer that is exactly 2^ADDR_W ahead of the synchronized read pointer,
// and be low for every other distance. Pointers are random binary values,
// converted to Gray code in the testbench; distances near full are favoured.
module wfull_flag_tb;
  localparam int unsigned ADDR_W = 4, DEPTH = 1 << ADDR_W;
  logic w_clk = 0, rst_n = 0, full;
  logic [ADDR_W:0] wgray_next = '0, wq2_rgray = '0;
  logic [ADDR_W:0] wb, rb;
  logic exp_full;
  int checks = 0, failures = 0, n_full = 0;

  wfull_flag #(.ADDR_W(ADDR_W)) dut (.*);

  function automatic logic [ADDR_W:0] to_gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  always #5 w_clk = ~w_clk;

  initial begin
    repeat (5000) @(posedge w_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (full !== 1'b0) begin failures++; $display("full set during reset"); end
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge w_clk);
      rb = (ADDR_W+1)'($urandom);
      if ($urandom_range(0, 1)) wb = rb + (ADDR_W+1)'($urandom_range(DEPTH - 2, DEPTH));
      else                      wb = rb + (ADDR_W+1)'($urandom_range(0, DEPTH));
      wgray_next = to_gray(wb);
      wq2_rgray  = to_gray(rb);
      exp_full   = ((wb - rb) == (ADDR_W+1)'(DEPTH));
      @(posedge w_clk); #1;
      checks++;
      if (exp_full) n_full++;
      if (full !== exp_full) begin
        failures++;
        $display("w=%0d r=%0d: full %b expected %b", wb, rb, full, exp_full);
      end
    end
    checks++;
    if (n_full == 0) begin failures++; $display("full never expected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
