// tb_adder: self-checking test of adder (32 bits).
// Checks the PC+4 case, wrap-around at the top of the range and random pairs
// against a 33-bit sum computed in the testbench, truncated to 32 bits.
module tb_adder;
  logic clk = 0;
  logic [31:0] a, b, s;
  logic [32:0] wide;
  int checks = 0, failures = 0;

  adder #(.WIDTH(32)) dut (.a(a), .b(b), .sum(s));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(input logic [31:0] x, input logic [31:0] y);
    a = x; b = y; #1;
    wide = {1'b0, x} + {1'b0, y};
    checks++;
    if (s !== wide[31:0]) begin failures++; $display("%h + %h = %h expected %h", x, y, s, wide[31:0]); end
  endtask

  initial begin
    t(32'h0, 32'd4);
    t(32'h0000_0ffc, 32'd4);
    t(32'hffff_fffc, 32'd4);
    t(32'h8000_0000, 32'h8000_0000);
    for (int i = 0; i < 5000; i++) t($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
