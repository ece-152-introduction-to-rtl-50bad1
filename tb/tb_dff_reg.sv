// tb_dff_reg: self-checking test of dff_reg.
// Drives random data and write enables for many cycles and compares q with a
// model register after each rising edge: q must load d only when we is high,
// hold otherwise, and clear on reset.
module tb_dff_reg;
  localparam int N = 32;
  logic clk = 0, rst, we;
  logic [N-1:0] d, q, model;
  int checks = 0, failures = 0;

  dff_reg #(.N(N)) dut (.clk(clk), .rst(rst), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; d = '1;
    @(posedge clk); #1;
    checks++; if (q !== '0) begin failures++; $display("reset: q=%h", q); end
    rst = 0; model = '0;
    for (int i = 0; i < 1000; i++) begin
      we = $urandom_range(0, 1) == 1;
      d  = $urandom;
      @(posedge clk); #1;
      if (we) model = d;
      checks++;
      if (q !== model) begin failures++; $display("cycle %0d: q=%h expected %h", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
