// wptr_ctrl_tb: the write pointer must advance only when w_en is high and
// full is low, wrap through all 2^(ADDR_W+1) values, and present the RAM
// address, the registered Gray pointer and the next Gray pointer that a
// reference counter in the testbench predicts.
module wptr_ctrl_tb;
  localparam int unsigned ADDR_W = 4;
  logic w_clk = 0, rst_n = 0, w_en = 0, full = 0;
  logic w_inc;
  logic [ADDR_W-1:0] waddr;
  logic [ADDR_W:0] wgray, wgray_next;
  logic [ADDR_W:0] ref_bin, nxt;
  int checks = 0, failures = 0;

  wptr_ctrl #(.ADDR_W(ADDR_W)) dut (.*);

  function automatic logic [ADDR_W:0] to_gray(input logic [ADDR_W:0] b);
    logic [ADDR_W:0] g;
    for (int i = 0; i < ADDR_W; i++) g[i] = b[i] ^ b[i+1];
    g[ADDR_W] = b[ADDR_W];
    return g;
  endfunction

  always #5 w_clk = ~w_clk;

  initial begin
    repeat (5000) @(posedge w_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [ADDR_W:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    ref_bin = '0;
    #12;
    check(wgray, '0, "reset gray");
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge w_clk);
      w_en = ($urandom_range(0, 3) != 0);
      full = ($urandom_range(0, 4) == 0);
      #1;
      nxt = ref_bin + ((w_en && !full) ? 1 : 0);
      check({4'b0, w_inc}, {4'b0, w_en && !full}, "w_inc");
      check({1'b0, waddr}, {1'b0, ref_bin[ADDR_W-1:0]}, "waddr");
      check(wgray, to_gray(ref_bin), "wgray");
      check(wgray_next, to_gray(nxt), "wgray_next");
      @(posedge w_clk);
      ref_bin = nxt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
