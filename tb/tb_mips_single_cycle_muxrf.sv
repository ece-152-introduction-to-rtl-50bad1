// tb_mips_single_cycle_muxrf: the end-to-end processor test of
// tb_mips_single_cycle, run on the processor built with the mux-based register
// file (RF_TRISTATE = 0) instead of the tri-state one. All other parameters
// are at their defaults; the programs, the reference model and the checks are
// the same (mips_tb_body.svh).
module tb_mips_single_cycle_muxrf;
`include "mips_tb_body.svh"

  mips_single_cycle #(.RF_TRISTATE(1'b0)) dut (
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
