// adder: WIDTH-bit two's-complement adder, carry out dropped.
//
// The fetch stage uses one as the +4 incrementer that forms the default next
// PC (byte addresses, 4-byte instructions), and the branch logic uses another
// to add the shifted offset to PC+4. Purely combinational.
module adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);

  assign sum = a + b;

endmodule
