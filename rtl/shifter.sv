// shifter: logical left shift for sll.
//
// y = a shifted left by shamt bit positions, zeros shifted in; shamt is the
// 5-bit Sh field of the R-type instruction and a is the rt register value.
// Combinational.
module shifter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0]         a,
  input  logic [$clog2(WIDTH)-1:0] shamt,
  output logic [WIDTH-1:0]         y
);

  assign y = a << shamt;

endmodule
