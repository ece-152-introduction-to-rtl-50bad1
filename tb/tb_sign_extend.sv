// tb_sign_extend: self-checking test of sign_extend (16 to 32 bits).
// All 65536 immediates: the result, read as a signed number, must equal the
// immediate read as a signed 16-bit number.
module tb_sign_extend;
  logic clk = 0;
  logic [15:0] a;
  logic [31:0] y;
  int checks = 0, failures = 0;

  sign_extend #(.IN_W(16), .OUT_W(32)) dut (.a(a), .y(y));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      int signed v;
      a = 16'(i); #1;
      v = (i >= 32768) ? i - 65536 : i;
      checks++;
      if ($signed(y) != v) begin failures++; $display("%h -> %h expected %0d", a, y, v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
