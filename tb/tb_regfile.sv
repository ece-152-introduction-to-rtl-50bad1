// tb_regfile: self-checking test of regfile (mux read ports; the 32-entry instance has register 0 hard-wired to zero).
// Two instances are tested side by side: the 4-register file of the
// worked example and the 32 x 32-bit MIPS register file. Each cycle random
// read addresses, a random write address and data and a random write enable
// are applied; before the edge both read ports are compared with a model
// array (so a same-cycle write is not yet visible), and after the edge the
// written register is read back through port 1.
module tb_regfile;
  localparam int W = 32;
  logic clk = 0, rst;
  int checks = 0, failures = 0;

  // 4-register instance
  logic we4; logic [1:0] rd4, a4, b4; logic [W-1:0] wd4, ra4, rb4;
  logic [W-1:0] m4 [4];
  regfile #(.WIDTH(W), .NREGS(4), .ZERO_R0(1'b0)) dut4 (
    .clk(clk), .rst(rst), .we(we4), .rd(rd4), .rdval(wd4),
    .rs1(a4), .rs2(b4), .rs1val(ra4), .rs2val(rb4));

  // 32-register instance at the default size
  logic we32; logic [4:0] rd32, a32, b32; logic [W-1:0] wd32, ra32, rb32;
  logic [W-1:0] m32 [32];
  regfile #(.ZERO_R0(1'b1)) dut32 (
    .clk(clk), .rst(rst), .we(we32), .rd(rd32), .rdval(wd32),
    .rs1(a32), .rs2(b32), .rs1val(ra32), .rs2val(rb32));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; we4 = 0; we32 = 0;
    rd4 = 0; a4 = 0; b4 = 0; wd4 = 0; rd32 = 0; a32 = 0; b32 = 0; wd32 = 0;
    @(posedge clk); #1;
    rst = 0;
    foreach (m4[i]) m4[i] = '0;
    foreach (m32[i]) m32[i] = '0;
    for (int i = 0; i < 4; i++) begin
      a4 = 2'(i); a32 = 5'(i * 7); #1;
      chk("reset 4", ra4, '0);
      chk("reset 32", ra32, '0);
    end
    for (int c = 0; c < 3000; c++) begin
      we4 = $urandom_range(0, 3) != 0; rd4 = 2'($urandom); wd4 = $urandom;
      a4 = 2'($urandom); b4 = 2'($urandom);
      we32 = $urandom_range(0, 3) != 0; rd32 = 5'($urandom); wd32 = $urandom;
      a32 = 5'($urandom); b32 = 5'($urandom);
      #1;
      chk("4 rs1", ra4, m4[a4]);
      chk("4 rs2", rb4, m4[b4]);
      chk("32 rs1", ra32, m32[a32]);
      chk("32 rs2", rb32, m32[b32]);
      @(posedge clk);
      if (we4) m4[rd4] = wd4;
      if (we32 && !(1 && rd32 == 0)) m32[rd32] = wd32;
      #1;
      we4 = 0; we32 = 0;
      a4 = rd4; a32 = rd32; #1;
      chk("4 readback", ra4, m4[rd4]);
      chk("32 readback", ra32, m32[rd32]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
