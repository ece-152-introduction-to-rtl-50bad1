// tb_mips_single_cycle: end-to-end test of the single-cycle processor at its
// default parameters (32-bit words, 32 registers, 1024-word memories).
//
// A reference model of the instruction set, written independently of the RTL,
// runs in lock step with the processor, observed only through its ports. Each
// cycle the testbench checks that the processor fetches from the model's PC
// and that the register write (enable, register, value) and the data-memory
// store (enable, word address, data) it is about to commit are the model's.
// Loaded values and branch decisions depend on earlier results, so a wrong
// register or memory word shows up in later writes or in the PC. Because the
// design executes one instruction per clock, the number of cycles to reach the
// final self-loop must equal the number of instructions executed (CPI = 1).
//
// Two programs are run, each loaded while the core is held in reset:
//  1. A hand-written program: a counting loop with beq/add/sw/lw/addi/j, a
//     subroutine call with jal and return with jr $31, slt with both outcomes,
//     sll, negative immediates and offsets, and a write to $0 that must be
//     discarded (the next instruction reads $0).
//  2. A random straight-line program of add, addi, slt, sll, lw, sw and
//     forward beq over a 32-word data region that is cleared first.
// Every mechanism (each instruction, branch taken and not taken, jal link,
// $0 write discarded) is counted, and one that never happened is a failure.
module tb_mips_single_cycle;
`include "mips_tb_body.svh"

  mips_single_cycle dut (
    .clk(clk), .rst(rst), .load_we(load_we), .load_addr(load_addr),
    .load_data(load_data), .pc(pc), .instr(instr),
    .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata),
    .dmem_we(dmem_we), .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
