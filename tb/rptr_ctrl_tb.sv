// rptr_ctrl_tb: the read pointer must advance only when r_en is high, empty
// is low and no reload is requested; a reload sets it to load_bin and
// suppresses the read in that cycle. Address, Gray pointer and next Gray
// pointer are compared with a reference counter.
module rptr_ctrl_tb;
  localparam int unsigned ADDR_W = 4;
  logic r_clk = 0, rst_n = 0, r_en = 0, empty = 1, load = 0;
  logic [ADDR_W:0] load_bin = '0;
  logic r_inc;
  logic [ADDR_W-1:0] raddr;
  logic [ADDR_W:0] rbin, rgray, rgray_next;
  logic [ADDR_W:0] ref_bin, nxt;
  int checks = 0, failures = 0, loads = 0;

  rptr_ctrl #(.ADDR_W(ADDR_W)) dut (.*);

  function automatic logic [ADDR_W:0] to_gray(input logic [ADDR_W:0] b);
    logic [ADDR_W:0] g;
    for (int i = 0; i < ADDR_W; i++) g[i] = b[i] ^ b[i+1];
    g[ADDR_W] = b[ADDR_W];
    return g;
  endfunction

  always #5 r_clk = ~r_clk;

  initial begin
    repeat (5000) @(posedge r_clk);
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
    check(rgray, '0, "reset gray");
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge r_clk);
      r_en  = ($urandom_range(0, 3) != 0);
      empty = ($urandom_range(0, 4) == 0);
      load  = ($urandom_range(0, 15) == 0);
      load_bin = (ADDR_W+1)'($urandom);
      #1;
      if (load) begin
        nxt = load_bin;
        loads++;
      end else begin
        nxt = ref_bin + ((r_en && !empty) ? 1 : 0);
      end
      check({4'b0, r_inc}, {4'b0, r_en && !empty && !load}, "r_inc");
      check({1'b0, raddr}, {1'b0, ref_bin[ADDR_W-1:0]}, "raddr");
      check(rbin, ref_bin, "rbin");
      check(rgray, to_gray(ref_bin), "rgray");
      check(rgray_next, to_gray(nxt), "rgray_next");
      @(posedge r_clk);
      ref_bin = nxt;
    end
    checks++;
    if (loads == 0) begin failures++; $display("no reload exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
