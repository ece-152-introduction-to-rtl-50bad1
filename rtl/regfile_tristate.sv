// regfile_tristate: register file whose read ports are tri-state buses.
//
// Storage and write port are as in regfile: NREGS dff_reg registers, RDVAL
// driven to all of them, and the register named by RD loaded on the rising
// clock edge when WE is high. The read ports replace the wide mux: every
// register drives each port's shared bus through a tri-state buffer, and a
// decoder of RS1 (or RS2) enables exactly one buffer per bus, so one driver is
// active and all others are high-impedance. This is the organisation the
// processor description proposes for large register files, where a 32-to-1
// mux would be slow. Reads are combinational. The synchronous reset to zero
// is this design's choice, and so is ZERO_R0 = 1, which makes register 0
// ignore writes so that it reads as zero, as MIPS $0 does. In a two-state simulator a bus with no driver
// would read zero, but the decoders always enable exactly one driver.
// Synthesis checks report several drivers on rs1_bus and rs2_bus: they are
// the NREGS tri-state buffers of each bus, which is the point of this design.
module regfile_tristate #(
  parameter int unsigned WIDTH   = 32,
  parameter int unsigned NREGS   = 32,
  parameter bit          ZERO_R0 = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] rd,
  input  logic [WIDTH-1:0]         rdval,
  input  logic [$clog2(NREGS)-1:0] rs1,
  input  logic [$clog2(NREGS)-1:0] rs2,
  output logic [WIDTH-1:0]         rs1val,
  output logic [WIDTH-1:0]         rs2val
);

  logic [NREGS-1:0]            reg_we;
  logic [NREGS-1:0]            rs1_en;
  logic [NREGS-1:0]            rs2_en;
  logic [NREGS-1:0][WIDTH-1:0] q;
  tri   [WIDTH-1:0]            rs1_bus;
  tri   [WIDTH-1:0]            rs2_bus;

  decoder #(.N(NREGS)) u_wdec   (.a(rd),  .en(we),   .y(reg_we));
  decoder #(.N(NREGS)) u_rs1dec (.a(rs1), .en(1'b1), .y(rs1_en));
  decoder #(.N(NREGS)) u_rs2dec (.a(rs2), .en(1'b1), .y(rs2_en));

  for (genvar i = 0; i < NREGS; i++) begin : g_reg
    dff_reg #(.N(WIDTH)) u_reg (
      .clk (clk),
      .rst (rst),
      .we  (reg_we[i] && !(ZERO_R0 && i == 0)),
      .d   (rdval),
      .q   (q[i])
    );
    // One tri-state buffer per register and read port: E = decoded RS, D = register.
    assign rs1_bus = rs1_en[i] ? q[i] : 'z;
    assign rs2_bus = rs2_en[i] ? q[i] : 'z;
  end

  assign rs1val = rs1_bus;
  assign rs2val = rs2_bus;

endmodule
