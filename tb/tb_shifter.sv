// tb_shifter: self-checking test of shifter.
// Every shift amount 0..31 on random values, checked against a bit-by-bit
// model: output bit i equals input bit i-shamt, or zero below shamt.
module tb_shifter;
  logic clk = 0;
  logic [31:0] a, y, e;
  logic [4:0] sh;
  int checks = 0, failures = 0;

  shifter #(.WIDTH(32)) dut (.a(a), .shamt(sh), .y(y));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 100; r++) begin
      for (int s = 0; s < 32; s++) begin
        a = $urandom; sh = 5'(s); #1;
        for (int i = 0; i < 32; i++) e[i] = (i >= s) ? a[i - s] : 1'b0;
        checks++;
        if (y !== e) begin failures++; $display("%h << %0d = %h expected %h", a, s, y, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
