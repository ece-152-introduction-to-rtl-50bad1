// control: single-cycle control unit.
//
// A purely combinational table, indexed by the opcode and, for R-type
// instructions, the function field, that gives every control signal the
// datapath needs for the one cycle an instruction takes: which field names the
// destination register, whether the ALU's second operand is the register or
// the sign-extended immediate, the ALU operation, the register write-data
// source, the register-file and data-memory write enables, and the three
// next-PC choices (branch if equal, jump, jump register). It is written as a
// case table, which is how a ROM or PLA holding this table behaves. The
// instruction set (add, addi, lw, sw, beq, j, sll, slt, jal, jr) and the
// datapath paths each one uses follow the processor description; the numeric
// encodings are the standard MIPS ones. An unknown instruction writes nothing
// and falls through to PC+4 (this design's choice).
module control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{reg_dst: DST_RD, alu_imm: 1'b0, alu_op: ALU_ADD, wb_sel: WB_ALU,
             reg_we: 1'b0, mem_we: 1'b0, branch: 1'b0, jump: 1'b0, jump_reg: 1'b0};
    case (op)
      OP_RTYPE: begin
        case (funct)
          FN_ADD: ctrl.reg_we = 1'b1;
          FN_SLT: begin
            ctrl.alu_op = ALU_SUB;
            ctrl.wb_sel = WB_COND;
            ctrl.reg_we = 1'b1;
          end
          FN_SLL: begin
            ctrl.wb_sel = WB_SHIFT;
            ctrl.reg_we = 1'b1;
          end
          FN_JR:  ctrl.jump_reg = 1'b1;
          default: ;
        endcase
      end
      OP_ADDI: begin
        ctrl.reg_dst = DST_RT;
        ctrl.alu_imm = 1'b1;
        ctrl.reg_we  = 1'b1;
      end
      OP_LW: begin
        ctrl.reg_dst = DST_RT;
        ctrl.alu_imm = 1'b1;
        ctrl.wb_sel  = WB_MEM;
        ctrl.reg_we  = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_imm = 1'b1;
        ctrl.mem_we  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.alu_op = ALU_SUB;
        ctrl.branch = 1'b1;
      end
      OP_J:   ctrl.jump = 1'b1;
      OP_JAL: begin
        ctrl.reg_dst = DST_RA;
        ctrl.wb_sel  = WB_PC4;
        ctrl.reg_we  = 1'b1;
        ctrl.jump    = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
