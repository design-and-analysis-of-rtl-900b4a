// gray_conv_tb: exhaustive test of the binary to Gray converter.
// Every 6-bit input is applied; the output is compared with a bit-by-bit
// reference (gray[i] = bin[i] XOR bin[i+1], top bit unchanged), and
// consecutive codes, including the wrap from all ones to zero, must differ
// in exactly one bit.
module gray_conv_tb;
  localparam int unsigned W = 6;
  logic [W-1:0] bin, gray, prev_gray, ref_gray;
  int checks = 0, failures = 0;

  gray_conv #(.W(W)) dut (.bin(bin), .gray(gray));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= (1 << W); v++) begin
      bin = W'(v);
      #1;
      for (int i = 0; i < W - 1; i++) ref_gray[i] = bin[i] ^ bin[i+1];
      ref_gray[W-1] = bin[W-1];
      checks++;
      if (gray !== ref_gray) begin
        failures++;
        $display("bin %b: gray %b, expected %b", bin, gray, ref_gray);
      end
      if (v > 0) begin
        checks++;
        if ($countones(gray ^ prev_gray) != 1) begin
          failures++;
          $display("codes %b and %b differ in more than one bit", prev_gray, gray);
        end
      end
      prev_gray = gray;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
