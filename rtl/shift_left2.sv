// shift_left2: the "<<2" unit that turns a word offset into a byte offset.
//
// y = a * 4, taking the low OUT_W bits of {a, 2'b00} (zero-padded when OUT_W
// is wider). The branch path uses it on the sign-extended 32-bit offset; the
// jump path uses it on the 26-bit target field (IN_W = 26, OUT_W = 28).
// Combinational.
module shift_left2 #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  a,
  output logic [OUT_W-1:0] y
);

  logic [IN_W+1:0] shifted;

  assign shifted = {a, 2'b00};

  if (OUT_W <= IN_W + 2) begin : g_trunc
    assign y = shifted[OUT_W-1:0];
  end else begin : g_pad
    assign y = {{(OUT_W-IN_W-2){1'b0}}, shifted};
  end

endmodule
