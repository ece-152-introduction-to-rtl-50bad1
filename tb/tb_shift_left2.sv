// tb_shift_left2: self-checking test of shift_left2.
// The branch use (32 to 32 bits) must multiply by four modulo 2^32; the jump
// use (26 to 28 bits) must equal the field times four.
module tb_shift_left2;
  logic clk = 0;
  logic [31:0] a32, y32;
  logic [25:0] a26;
  logic [27:0] y28;
  int checks = 0, failures = 0;

  shift_left2 #(.IN_W(32), .OUT_W(32)) dut_br (.a(a32), .y(y32));
  shift_left2 #(.IN_W(26), .OUT_W(28)) dut_j  (.a(a26), .y(y28));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      longint unsigned p;
      a32 = $urandom; a26 = 26'($urandom); #1;
      p = longint'(a32) * 4;
      checks++;
      if (y32 !== p[31:0]) begin failures++; $display("br %h -> %h", a32, y32); end
      p = longint'(a26) * 4;
      checks++;
      if (y28 !== p[27:0]) begin failures++; $display("j %h -> %h", a26, y28); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
