// fifo_mem_tb: dual-port RAM test with unrelated write and read clocks.
// Checks the reset value of the read register, then fills every word with
// random data through the write port, reads all words back in random order
// through the registered read port, and checks that rdata holds while
// r_inc is low and that a word is not written while w_inc is low.
module fifo_mem_tb;
  localparam int unsigned DATA_W = 16, ADDR_W = 4, DEPTH = 1 << ADDR_W;
  logic w_clk = 0, r_clk = 0, rst_n = 0;
  logic w_inc = 0, r_inc = 0;
  logic [ADDR_W-1:0] waddr = '0, raddr = '0;
  logic [DATA_W-1:0] wdata = '0, rdata, held;
  logic [DATA_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  fifo_mem #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) dut (.*);

  always #5 w_clk = ~w_clk;
  always #7 r_clk = ~r_clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [DATA_W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #20;
    check(rdata, '0, "reset value");
    rst_n = 1;
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge w_clk);
      w_inc = 1; waddr = ADDR_W'(a); wdata = DATA_W'($urandom);
      model[a] = wdata;
    end
    // writes with w_inc low must not land
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge w_clk);
      w_inc = 0; waddr = ADDR_W'(a); wdata = ~model[a];
    end
    @(negedge w_clk);
    // random-order reads
    for (int n = 0; n < 4 * DEPTH; n++) begin
      @(negedge r_clk);
      r_inc = 1; raddr = ADDR_W'($urandom);
      @(posedge r_clk); #1;
      check(rdata, model[raddr], $sformatf("read of word %0d", raddr));
      // hold while r_inc is low
      @(negedge r_clk);
      r_inc = 0; held = rdata; raddr = raddr + 1'b1;
      @(posedge r_clk); #1;
      check(rdata, held, "rdata held while r_inc low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
