// sign_extend: the sign-extension (sx) unit.
//
// Widens the IN_W-bit immediate to OUT_W bits by copying its top bit into
// the new upper bits, so that negative offsets stay negative. It feeds the
// ALU's second operand (addi, lw, sw) and the branch offset. Combinational.
module sign_extend #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  a,
  output logic [OUT_W-1:0] y
);

  assign y = {{(OUT_W-IN_W){a[IN_W-1]}}, a};

endmodule
