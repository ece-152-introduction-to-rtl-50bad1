// tb_zero_extend: self-checking test of zero_extend.
// The 1-bit condition case used by slt (0 -> 0, 1 -> 1) and a 16-bit
// instance on random values, where the result must equal the unsigned value.
module tb_zero_extend;
  logic clk = 0;
  logic a1;
  logic [31:0] y1, y16;
  logic [15:0] a16;
  int checks = 0, failures = 0;

  zero_extend #(.IN_W(1), .OUT_W(32))  dut1  (.a(a1),  .y(y1));
  zero_extend #(.IN_W(16), .OUT_W(32)) dut16 (.a(a16), .y(y16));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a1 = 0; #1; checks++; if (y1 !== 32'd0) failures++;
    a1 = 1; #1; checks++; if (y1 !== 32'd1) begin failures++; $display("1 -> %h", y1); end
    for (int i = 0; i < 2000; i++) begin
      int unsigned v;
      v = $urandom_range(0, 65535); a16 = 16'(v); #1;
      checks++;
      if (y16 != v) begin failures++; $display("%h -> %h", a16, y16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
