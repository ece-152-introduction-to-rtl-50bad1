// zero_extend: the zero-extension unit for the ALU condition bits.
//
// Widens the IN_W-bit value to OUT_W bits with zeros above it, so that slt
// writes 1 or 0 into the destination register. Combinational.
module zero_extend #(
  parameter int unsigned IN_W  = 1,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  a,
  output logic [OUT_W-1:0] y
);

  assign y = {{(OUT_W-IN_W){1'b0}}, a};

endmodule
