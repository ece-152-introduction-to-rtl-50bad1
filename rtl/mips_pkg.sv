// mips_pkg: shared types and constants of the single-cycle MIPS-subset processor.
//
// It holds the instruction-field encodings, the ALU operation codes and the
// bundle of control signals that the single-cycle control unit drives into the
// datapath. The instruction formats (R-type: Op(6) rs(5) rt(5) rd(5) Sh(5)
// Func(6); I-type: Op(6) rs(5) rt(5) Immed(16)) follow the processor's
// description. The numeric opcode and function-field values are the standard
// MIPS ones; the description does not list them, so they are this design's
// choice, as are the encodings of the select enums.
package mips_pkg;

  // Major opcodes (instruction bits 31:26).
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_JAL   = 6'h03,
    OP_BEQ   = 6'h04,
    OP_ADDI  = 6'h08,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_e;

  // R-type function field (instruction bits 5:0).
  typedef enum logic [5:0] {
    FN_SLL = 6'h00,
    FN_JR  = 6'h08,
    FN_ADD = 6'h20,
    FN_SLT = 6'h2A
  } funct_e;

  // ALU operations: add for add/addi/lw/sw, subtract for beq and slt.
  typedef enum logic [0:0] {
    ALU_ADD = 1'b0,
    ALU_SUB = 1'b1
  } alu_op_e;

  // Destination-register mux select: rd (R-type), rt (I-type) or $31 (jal).
  typedef enum logic [1:0] {
    DST_RD = 2'd0,
    DST_RT = 2'd1,
    DST_RA = 2'd2
  } reg_dst_e;

  // Register write-data mux select.
  typedef enum logic [2:0] {
    WB_ALU   = 3'd0,   // ALU result
    WB_MEM   = 3'd1,   // data memory output (lw)
    WB_COND  = 3'd2,   // zero-extended ALU condition bit (slt)
    WB_PC4   = 3'd3,   // PC+4 (jal)
    WB_SHIFT = 3'd4    // shifter output (sll)
  } wb_sel_e;

  localparam int unsigned RA_REG = 31;  // implicit jal destination

  // Everything the single-cycle control unit decides for one instruction.
  typedef struct packed {
    reg_dst_e reg_dst;   // which field names the destination register
    logic     alu_imm;   // ALU B input: 1 = sign-extended immediate, 0 = rt value
    alu_op_e  alu_op;    // ALU operation
    wb_sel_e  wb_sel;    // register write-data source
    logic     reg_we;    // register file write enable
    logic     mem_we;    // data memory write enable
    logic     branch;    // beq: take the branch target when the ALU says zero
    logic     jump;      // j / jal: take the absolute jump target
    logic     jump_reg;  // jr: take the register value as next PC
  } ctrl_t;

endpackage
