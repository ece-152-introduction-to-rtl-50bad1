// regfile: the architectural register file, two read ports and one write port.
//
// Each of the NREGS registers is a dff_reg. The write port drives RDVAL into
// every register, and a decoder enables only the one named by RD, and only
// when WE is high, so a write happens on the rising clock edge. Each read port
// is an NREGS-to-1 mux fed by all register outputs and selected by RS1 or RS2;
// reads are combinational, so a value written at an edge is read back right
// after it. This is the mux-based organisation of the processor description
// (there shown with four registers); the default size is the MIPS one, 32
// registers of 32 bits. The description also says a register file is read on
// the clock edge that does not write it; here the reads are combinational,
// which a single-cycle datapath needs, and a write and a read of the same
// register in one cycle returns the old value until the edge.
// ZERO_R0 = 1 makes register 0 read as zero and ignore writes, as MIPS $0
// does; that option and the synchronous reset of all registers to zero are
// this design's choices.
module regfile #(
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
  logic [NREGS-1:0][WIDTH-1:0] q;

  decoder #(.N(NREGS)) u_wdec (.a(rd), .en(we), .y(reg_we));

  for (genvar i = 0; i < NREGS; i++) begin : g_reg
    dff_reg #(.N(WIDTH)) u_reg (
      .clk (clk),
      .rst (rst),
      .we  (reg_we[i] && !(ZERO_R0 && i == 0)),
      .d   (rdval),
      .q   (q[i])
    );
  end

  mux_n #(.N(NREGS), .WIDTH(WIDTH)) u_rs1_mux (.d(q), .sel(rs1), .y(rs1val));
  mux_n #(.N(NREGS), .WIDTH(WIDTH)) u_rs2_mux (.d(q), .sel(rs2), .y(rs2val));

endmodule
