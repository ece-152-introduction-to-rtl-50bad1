// decoder: binary-to-one-hot decoder with an enable.
//
// Output bit i is high when en is high and a equals i. The register files use
// it to turn the write address into per-register write enables (decoded RD
// AND WE), and the tri-state register file also uses it to enable one read
// buffer per port. Purely combinational.
module decoder #(
  parameter int unsigned N = 4
) (
  input  logic [$clog2(N)-1:0] a,
  input  logic                 en,
  output logic [N-1:0]         y
);

  always_comb begin
    y = '0;
    for (int unsigned i = 0; i < N; i++)
      y[i] = en && (a == i[$clog2(N)-1:0]);
  end

endmodule
