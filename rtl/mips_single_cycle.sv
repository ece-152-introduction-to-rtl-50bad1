// mips_single_cycle: a single-cycle processor for a subset of the MIPS ISA.
//
// Every instruction is fetched, decoded and executed in one clock cycle. The
// PC register addresses the instruction memory; a +4 adder forms the default
// next PC. The instruction's rs and rt fields address the two read ports of
// the register file; a mux picks rd, rt or $31 as the destination. The ALU
// adds or subtracts the rs value and either the rt value or the sign-extended
// 16-bit immediate. The data memory is addressed by the ALU result and written
// with the rt value. A five-input mux chooses what is written back: the ALU
// result, the loaded word, the zero-extended ALU less-than bit, PC+4 or the
// shifter output. The next PC goes through three muxes in a row: PC+4 or the
// branch target (PC+4 plus the offset shifted left by 2) when the control says
// branch AND the ALU says zero; then the jump target (the 26-bit field shifted
// left by 2 under the top four bits of PC+4); then the rs value for jr.
//
// Instructions: add, addi, lw, sw, beq, j, sll, slt, jal, jr. All of their
// datapath paths follow the processor description. This design's own choices:
// the standard MIPS encodings, register $0 hard-wired to zero, PC reset to 0,
// memory sizes, the upper PC bits of the jump target, and the load port.
//
// The register file's read ports are tri-state buses by default
// (RF_TRISTATE = 1), the organisation the description recommends once there
// are 32 registers; RF_TRISTATE = 0 uses the NREGS-to-1 mux read ports.
//
// Interface and timing: clk rising edge commits the PC, the register write
// and the data-memory write of the current instruction; rst is synchronous
// and active high (PC and all registers to zero). The instruction memory is
// filled through load_we/load_addr/load_data while rst is held high; during
// that time the load address replaces the PC on the memory's single address
// bus. pc and instr show the instruction executing in the current cycle;
// rf_we/rf_waddr/rf_wdata show the register write it will commit at the next
// edge (a write to $0 is shown but dropped by the register file), and
// dmem_we/dmem_addr/dmem_wdata the data-memory store. These observation
// ports are this design's addition, for tracing and testing.
//
// yosys reports several drivers on the register file's read buses when
// RF_TRISTATE = 1: those are the tri-state buffers, of which the decoded
// read address enables exactly one at a time.
module mips_single_cycle
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH      = 32,
  parameter int unsigned NREGS      = 32,
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter bit          RF_TRISTATE = 1'b1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load_we,
  input  logic [31:0]      load_addr,
  input  logic [31:0]      load_data,
  output logic [31:0]      pc,
  output logic [31:0]      instr,
  output logic             rf_we,
  output logic [4:0]       rf_waddr,
  output logic [WIDTH-1:0] rf_wdata,
  output logic             dmem_we,
  output logic [31:0]      dmem_addr,
  output logic [WIDTH-1:0] dmem_wdata
);

  localparam int unsigned RW = $clog2(NREGS);

  // ---------------------------------------------------------------- fetch
  logic [31:0] pc_next, pc_plus4, imem_addr;

  dff_reg #(.N(32)) u_pc (.clk(clk), .rst(rst), .we(1'b1), .d(pc_next), .q(pc));

  adder #(.WIDTH(32)) u_pc_inc (.a(pc), .b(32'd4), .sum(pc_plus4));

  assign imem_addr = load_we ? load_addr : pc;

  memory #(.WIDTH(32), .WORDS(IMEM_WORDS)) u_imem (
    .clk(clk), .we(load_we), .address(imem_addr), .datain(load_data), .dataout(instr)
  );

  // ---------------------------------------------------------------- decode
  logic [5:0]  f_op, f_funct;
  logic [4:0]  f_rs, f_rt, f_rd, f_sh;
  logic [15:0] f_imm;
  logic [25:0] f_target;
  ctrl_t       ctrl;

  assign f_op     = instr[31:26];
  assign f_rs     = instr[25:21];
  assign f_rt     = instr[20:16];
  assign f_rd     = instr[15:11];
  assign f_sh     = instr[10:6];
  assign f_funct  = instr[5:0];
  assign f_imm    = instr[15:0];
  assign f_target = instr[25:0];

  control u_ctrl (.op(f_op), .funct(f_funct), .ctrl(ctrl));

  // ---------------------------------------------------------------- registers
  logic [RW-1:0]    dst;
  logic [WIDTH-1:0] rs_val, rt_val, wb_val;

  mux_n #(.N(3), .WIDTH(RW)) u_dst_mux (
    .d   ({RW'(RA_REG), f_rt[RW-1:0], f_rd[RW-1:0]}),
    .sel (ctrl.reg_dst),
    .y   (dst)
  );

  // The read ports of a 32-entry file are built from tri-state buses by
  // default; RF_TRISTATE = 0 selects the mux-based file instead.
  if (RF_TRISTATE) begin : g_rf
    regfile_tristate #(.WIDTH(WIDTH), .NREGS(NREGS), .ZERO_R0(1'b1)) u_rf (
      .clk(clk), .rst(rst), .we(ctrl.reg_we), .rd(dst), .rdval(wb_val),
      .rs1(f_rs[RW-1:0]), .rs2(f_rt[RW-1:0]), .rs1val(rs_val), .rs2val(rt_val)
    );
  end else begin : g_rf
    regfile #(.WIDTH(WIDTH), .NREGS(NREGS), .ZERO_R0(1'b1)) u_rf (
      .clk(clk), .rst(rst), .we(ctrl.reg_we), .rd(dst), .rdval(wb_val),
      .rs1(f_rs[RW-1:0]), .rs2(f_rt[RW-1:0]), .rs1val(rs_val), .rs2val(rt_val)
    );
  end

  // ---------------------------------------------------------------- execute
  logic [WIDTH-1:0] imm_sx, alu_b, alu_y, cond_zx, shift_y;
  logic             alu_zero, alu_lt;

  sign_extend #(.IN_W(16), .OUT_W(WIDTH)) u_sx (.a(f_imm), .y(imm_sx));

  mux_n #(.N(2), .WIDTH(WIDTH)) u_alub_mux (.d({imm_sx, rt_val}), .sel(ctrl.alu_imm), .y(alu_b));

  alu #(.WIDTH(WIDTH)) u_alu (
    .a(rs_val), .b(alu_b), .op(ctrl.alu_op), .result(alu_y), .zero(alu_zero), .lt(alu_lt)
  );

  zero_extend #(.IN_W(1), .OUT_W(WIDTH)) u_zx (.a(alu_lt), .y(cond_zx));

  shifter #(.WIDTH(WIDTH)) u_shift (.a(rt_val), .shamt(f_sh[$clog2(WIDTH)-1:0]), .y(shift_y));

  // ---------------------------------------------------------------- memory
  logic [WIDTH-1:0] dmem_out;

  memory #(.WIDTH(WIDTH), .WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .we(ctrl.mem_we && !rst), .address(32'(alu_y)), .datain(rt_val), .dataout(dmem_out)
  );

  // ---------------------------------------------------------------- write back
  mux_n #(.N(5), .WIDTH(WIDTH)) u_wb_mux (
    .d   ({shift_y, WIDTH'(pc_plus4), cond_zx, dmem_out, alu_y}),
    .sel (ctrl.wb_sel),
    .y   (wb_val)
  );

  // ---------------------------------------------------------------- next PC
  logic [31:0] br_off, br_target, pc_br, pc_jmp, jmp_target;
  logic [27:0] jmp_low;
  logic        take_branch;

  shift_left2 #(.IN_W(32), .OUT_W(32)) u_br_shl (.a(32'(signed'(imm_sx))), .y(br_off));
  adder #(.WIDTH(32)) u_br_add (.a(pc_plus4), .b(br_off), .sum(br_target));

  assign take_branch = ctrl.branch && alu_zero;

  mux_n #(.N(2), .WIDTH(32)) u_br_mux (.d({br_target, pc_plus4}), .sel(take_branch), .y(pc_br));

  shift_left2 #(.IN_W(26), .OUT_W(28)) u_j_shl (.a(f_target), .y(jmp_low));
  assign jmp_target = {pc_plus4[31:28], jmp_low};

  mux_n #(.N(2), .WIDTH(32)) u_j_mux (.d({jmp_target, pc_br}), .sel(ctrl.jump), .y(pc_jmp));

  mux_n #(.N(2), .WIDTH(32)) u_jr_mux (.d({32'(rs_val), pc_jmp}), .sel(ctrl.jump_reg), .y(pc_next));

  assign rf_we      = ctrl.reg_we;
  assign rf_waddr   = 5'(dst);
  assign rf_wdata   = wb_val;
  assign dmem_we    = ctrl.mem_we;
  assign dmem_addr  = 32'(alu_y);
  assign dmem_wdata = rt_val;

  // The single memory port can serve the loader only while the core is in reset.
  a_load_in_reset : assert property (@(posedge clk) load_we |-> rst)
    else $error("instruction memory loaded while the core runs");

endmodule
