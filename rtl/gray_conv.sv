// gray_conv: binary to Gray code converter.
//
// Pointers cross between the write and read clock domains as Gray code,
// in which two consecutive values differ in one bit only, so a pointer that
// is sampled while it changes is read as either its old or its new value.
// The conversion is gray = bin ^ (bin >> 1). Purely combinational.
//
// Ports: bin (W bits) in, gray (W bits) out.
module gray_conv #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] bin,
  output logic [W-1:0] gray
);

  always_comb gray = bin ^ (bin >> 1);

endmodule
