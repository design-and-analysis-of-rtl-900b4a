// sync_2ff_tb: the synchronizer must clear on reset and then show its input
// after exactly two rising clock edges. Random data, one new value per cycle.
module sync_2ff_tb;
  localparam int unsigned W = 5;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d, q;
  logic [W-1:0] hist [3];
  int checks = 0, failures = 0;

  sync_2ff #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("q not cleared by reset: %h", q); end
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3; i++) hist[i] = '0;
    for (int n = 0; n < 500; n++) begin
      d = W'($urandom);
      @(posedge clk);
      hist[2] = hist[1];
      hist[1] = hist[0];
      hist[0] = d;
      #1;
      // q now holds the value presented two edges ago
      if (n >= 1) begin
        checks++;
        if (q !== hist[1]) begin
          failures++;
          $display("cycle %0d: q %h, expected %h", n, q, hist[1]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
