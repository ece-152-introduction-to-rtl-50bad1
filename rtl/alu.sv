// alu: the processor's arithmetic unit, add or subtract with condition bits.
//
// ALU_ADD gives a+b (add, addi and the lw/sw address rs+imm); ALU_SUB gives
// a-b. Two condition bits come out beside the result: zero ("z", used by beq
// to test rs == rt) and lt, signed a < b, used by slt, which writes the
// condition bit rather than the difference. lt is the sign of the difference
// corrected for overflow, so it is right for all operand pairs. The choice of
// exactly these two operations and of the lt formula is this design's; the
// description only lists the instructions the ALU serves. Combinational.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          op,
  output logic [WIDTH-1:0] result,
  output logic             zero,
  output logic             lt
);

  logic [WIDTH-1:0] diff;
  logic             ovf;

  always_comb begin
    diff   = a - b;
    ovf    = (a[WIDTH-1] != b[WIDTH-1]) && (diff[WIDTH-1] != a[WIDTH-1]);
    result = (op == ALU_SUB) ? diff : a + b;
    zero   = (result == '0);
    lt     = diff[WIDTH-1] ^ ovf;
  end

endmodule
