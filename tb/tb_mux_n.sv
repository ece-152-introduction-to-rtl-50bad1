// tb_mux_n: self-checking test of mux_n with 2, 3, 5 and 32 inputs (the sizes
// the processor uses), random data, every select value.
module tb_mux_n;
  logic clk = 0;
  logic [1:0][31:0]  d2;  logic       s2;  logic [31:0] y2;
  logic [2:0][4:0]   d3;  logic [1:0] s3;  logic [4:0]  y3;
  logic [4:0][31:0]  d5;  logic [2:0] s5;  logic [31:0] y5;
  logic [31:0][31:0] d32; logic [4:0] s32; logic [31:0] y32;
  int checks = 0, failures = 0;

  mux_n #(.N(2),  .WIDTH(32)) m2  (.d(d2),  .sel(s2),  .y(y2));
  mux_n #(.N(3),  .WIDTH(5))  m3  (.d(d3),  .sel(s3),  .y(y3));
  mux_n #(.N(5),  .WIDTH(32)) m5  (.d(d5),  .sel(s5),  .y(y5));
  mux_n #(.N(32), .WIDTH(32)) m32 (.d(d32), .sel(s32), .y(y32));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string w, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %h expected %h", w, got, exp); end
  endtask

  initial begin
    for (int r = 0; r < 200; r++) begin
      for (int i = 0; i < 2; i++)  d2[i] = $urandom;
      for (int i = 0; i < 3; i++)  d3[i] = 5'($urandom);
      for (int i = 0; i < 5; i++)  d5[i] = $urandom;
      for (int i = 0; i < 32; i++) d32[i] = $urandom;
      for (int s = 0; s < 32; s++) begin
        s2 = 1'(s); s3 = 2'(s); s5 = 3'(s); s32 = 5'(s); #1;
        if (s < 2) chk("mux2", y2, d2[s]);
        if (s < 3) chk("mux3", 32'(y3), 32'(d3[s]));
        if (s < 5) chk("mux5", y5, d5[s]);
        chk("mux32", y32, d32[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
