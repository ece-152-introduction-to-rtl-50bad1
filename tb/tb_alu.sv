// tb_alu: self-checking test of alu.
// For add and subtract, compares the result with the testbench's own sum or
// difference, the zero bit with a compare of that result against zero, and
// the less-than bit with a signed comparison of the operands. Includes the
// overflow corners where the raw sign of a-b is wrong.
module tb_alu;
  import mips_pkg::*;
  logic clk = 0;
  logic [31:0] a, b, y;
  alu_op_e op;
  logic z, lt;
  int checks = 0, failures = 0;

  alu #(.WIDTH(32)) dut (.a(a), .b(b), .op(op), .result(y), .zero(z), .lt(lt));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(input logic [31:0] x, input logic [31:0] w, input alu_op_e o);
    logic [31:0] e;
    a = x; b = w; op = o; #1;
    e = (o == ALU_ADD) ? x + w : x - w;
    checks += 3;
    if (y !== e) begin failures++; $display("%s %h %h: %h expected %h", o.name(), x, w, y, e); end
    if (z !== (e == 0)) begin failures++; $display("zero wrong for %h %h", x, w); end
    if (lt !== ($signed(x) < $signed(w))) begin failures++; $display("lt wrong for %h %h", x, w); end
  endtask

  initial begin
    t(32'd5, 32'd5, ALU_SUB);
    t(32'h7fff_ffff, 32'h8000_0000, ALU_SUB);
    t(32'h8000_0000, 32'h7fff_ffff, ALU_SUB);
    t(32'hffff_ffff, 32'd1, ALU_ADD);
    t(32'hffff_fff9, 32'd3, ALU_SUB);
    for (int i = 0; i < 4000; i++) begin
      t($urandom, $urandom, alu_op_e'($urandom_range(0, 1)));
      t(32'($urandom_range(0, 7)), 32'($urandom_range(0, 7)), alu_op_e'($urandom_range(0, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
