// mux_n: N-input multiplexer of WIDTH-bit buses.
//
// y is the input selected by sel; a select value of N or more gives zero.
// The processor uses it for the destination-register choice, the ALU second
// operand, the register write data, the next-PC choices and the register
// file's mux read ports. Purely combinational.
module mux_n #(
  parameter int unsigned N     = 2,
  parameter int unsigned WIDTH = 32
) (
  input  logic [N-1:0][WIDTH-1:0] d,
  input  logic [$clog2(N)-1:0]    sel,
  output logic [WIDTH-1:0]        y
);

  always_comb begin
    y = '0;
    for (int unsigned i = 0; i < N; i++)
      if (sel == i[$clog2(N)-1:0]) y = d[i];
  end

endmodule
