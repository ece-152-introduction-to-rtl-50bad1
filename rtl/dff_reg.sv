// dff_reg: an N-bit register, a row of D flip-flops sharing one clock and one
// write enable.
//
// The register loads d on the rising clock edge when we is high and holds its
// value otherwise; q is read continuously, so a new value is visible right
// after the edge that writes it. Gating the flip-flops' load with the write
// enable follows the processor's register description; it is written here as a
// clock enable rather than an AND on the clock, which behaves the same and is
// safe for synthesis. The synchronous, active-high reset to zero is this
// design's addition so that simulation starts from a known state.
module dff_reg #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (we) q <= d;
  end

endmodule
