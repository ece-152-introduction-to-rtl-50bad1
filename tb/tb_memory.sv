// tb_memory: self-checking test of memory at its default size (1024 words).
// Random reads and writes on the single port are compared with a model: a
// write lands at the rising edge, the read data is combinational, and the two
// low address bits do not change which word is accessed.
module tb_memory;
  localparam int WORDS = 1024;
  logic clk = 0, we;
  logic [31:0] addr, din, dout;
  logic [31:0] model [WORDS];
  bit          valid [WORDS];
  int checks = 0, failures = 0;

  memory dut (.clk(clk), .we(we), .address(addr), .datain(din), .dataout(dout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; din = 0;
    // fill the whole array first
    for (int i = 0; i < WORDS; i++) begin
      we = 1; addr = 32'(i * 4); din = $urandom; model[i] = din; valid[i] = 1;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < WORDS; i++) begin
      addr = 32'(i * 4) | 32'($urandom_range(0, 3)); #1;
      checks++;
      if (dout !== model[i]) begin failures++; $display("word %0d: %h expected %h", i, dout, model[i]); end
    end
    for (int c = 0; c < 5000; c++) begin
      int unsigned w;
      w = $urandom_range(0, WORDS - 1);
      we = $urandom_range(0, 1) == 1; addr = 32'(w * 4); din = $urandom;
      #1;
      checks++;
      if (dout !== model[w]) begin failures++; $display("read %0d: %h expected %h", w, dout, model[w]); end
      @(posedge clk);
      if (we) model[w] = din;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
