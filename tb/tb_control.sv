// tb_control: self-checking test of the single-cycle control unit.
// For each of the ten instructions the expected control word is written out
// by hand from what the instruction must do in the datapath (which register it
// writes, the ALU operand and operation, the write-back source, memory write
// and next-PC choice). Undefined opcodes and function codes must write
// nothing and not redirect the PC.
module tb_control;
  import mips_pkg::*;
  logic clk = 0;
  logic [5:0] op, fn;
  ctrl_t c;
  int checks = 0, failures = 0;

  control dut (.op(op), .funct(fn), .ctrl(c));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exp fields: reg_dst, alu_imm, alu_op, wb_sel, reg_we, mem_we, branch, jump, jump_reg
  task automatic t(input string n, input logic [5:0] o, input logic [5:0] f, input ctrl_t e,
                   input bit dont_care_dst, input bit dont_care_alu);
    op = o; fn = f; #1;
    checks++;
    if (c.reg_we !== e.reg_we || c.mem_we !== e.mem_we || c.branch !== e.branch ||
        c.jump !== e.jump || c.jump_reg !== e.jump_reg ||
        (e.reg_we && (c.wb_sel !== e.wb_sel)) ||
        (!dont_care_dst && c.reg_dst !== e.reg_dst) ||
        (!dont_care_alu && (c.alu_imm !== e.alu_imm || c.alu_op !== e.alu_op))) begin
      failures++;
      $display("%s: got %p expected %p", n, c, e);
    end
  endtask

  initial begin
    t("add",  6'h00, 6'h20, '{DST_RD, 1'b0, ALU_ADD, WB_ALU,   1, 0, 0, 0, 0}, 0, 0);
    t("slt",  6'h00, 6'h2A, '{DST_RD, 1'b0, ALU_SUB, WB_COND,  1, 0, 0, 0, 0}, 0, 0);
    t("sll",  6'h00, 6'h00, '{DST_RD, 1'b0, ALU_ADD, WB_SHIFT, 1, 0, 0, 0, 0}, 0, 1);
    t("jr",   6'h00, 6'h08, '{DST_RD, 1'b0, ALU_ADD, WB_ALU,   0, 0, 0, 0, 1}, 1, 1);
    t("addi", 6'h08, 6'h3F, '{DST_RT, 1'b1, ALU_ADD, WB_ALU,   1, 0, 0, 0, 0}, 0, 0);
    t("lw",   6'h23, 6'h11, '{DST_RT, 1'b1, ALU_ADD, WB_MEM,   1, 0, 0, 0, 0}, 0, 0);
    t("sw",   6'h2B, 6'h00, '{DST_RT, 1'b1, ALU_ADD, WB_ALU,   0, 1, 0, 0, 0}, 1, 0);
    t("beq",  6'h04, 6'h20, '{DST_RT, 1'b0, ALU_SUB, WB_ALU,   0, 0, 1, 0, 0}, 1, 0);
    t("j",    6'h02, 6'h20, '{DST_RT, 1'b0, ALU_ADD, WB_ALU,   0, 0, 0, 1, 0}, 1, 1);
    t("jal",  6'h03, 6'h20, '{DST_RA, 1'b0, ALU_ADD, WB_PC4,   1, 0, 0, 1, 0}, 0, 1);
    // every undefined opcode and R-type function code
    for (int o = 0; o < 64; o++) begin
      if (o inside {6'h00, 6'h02, 6'h03, 6'h04, 6'h08, 6'h23, 6'h2B}) continue;
      t("undef op", 6'(o), 6'h20, '{DST_RD, 1'b0, ALU_ADD, WB_ALU, 0, 0, 0, 0, 0}, 1, 1);
    end
    for (int f = 0; f < 64; f++) begin
      if (f inside {6'h00, 6'h08, 6'h20, 6'h2A}) continue;
      t("undef funct", 6'h00, 6'(f), '{DST_RD, 1'b0, ALU_ADD, WB_ALU, 0, 0, 0, 0, 0}, 1, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
