// integer_delay_tb: checks the measured pointer difference against random
// pointers (the write pointer given in Gray code), the reloaded read
// pointer wptr - target (+1 with carry) one clock after load_req, and
// delay_ok after the testbench applies the reload to its read pointer.
module integer_delay_tb;
  localparam int unsigned ADDR_W = 4, DEPTH = 1 << ADDR_W;
  logic r_clk = 0, rst_n = 0;
  logic [ADDR_W:0] rq2_wgray = '0, rbin = '0, target_int = '0;
  logic carry = 0, load_req = 0;
  logic [ADDR_W:0] int_delay_meas, load_bin;
  logic load, delay_ok;
  logic [ADDR_W:0] wb, exp_bin;
  int checks = 0, failures = 0;

  integer_delay #(.ADDR_W(ADDR_W)) dut (.*);

  always #5 r_clk = ~r_clk;

  initial begin
    repeat (20000) @(posedge r_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [ADDR_W:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #12 rst_n = 1;
    // measurement of random pointer pairs
    for (int n = 0; n < 300; n++) begin
      @(negedge r_clk);
      wb = (ADDR_W+1)'($urandom);
      rbin = (ADDR_W+1)'($urandom);
      rq2_wgray = wb ^ (wb >> 1);
      @(posedge r_clk); #1;
      check(int_delay_meas, wb - rbin, "measured integer delay");
    end
    // corrections
    for (int n = 0; n < 200; n++) begin
      @(negedge r_clk);
      wb = (ADDR_W+1)'($urandom);
      rq2_wgray = wb ^ (wb >> 1);
      rbin = (ADDR_W+1)'($urandom);
      target_int = (ADDR_W+1)'($urandom_range(1, DEPTH));
      carry = 1'($urandom);
      load_req = 1;
      exp_bin = wb - target_int + (carry ? 1 : 0);
      @(posedge r_clk); #1;
      check({4'b0, load}, 5'd1, "load strobe");
      check(load_bin, exp_bin, "reloaded read pointer");
      @(negedge r_clk);
      load_req = 0;
      rbin = load_bin;            // the read pointer takes the reload
      @(posedge r_clk); #1;
      check({4'b0, load}, 5'd0, "load strobe is one cycle");
      check({4'b0, delay_ok}, 5'd1, "delay_ok after reload");
      @(negedge r_clk);
      rbin = rbin - 1'b1;         // disturb: difference now off by one
      @(posedge r_clk); #1;
      check({4'b0, delay_ok}, 5'd0, "delay_ok with a wrong difference");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
