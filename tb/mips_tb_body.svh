// mips_tb_body.svh: shared body of the end-to-end processor testbenches.
//
// Included inside a testbench module that instantiates the processor as
// `dut` and connects it to the signals declared here. It holds the clock,
// the instruction encoders, an instruction-set reference model, the program
// loader, the lock-step comparison and the two test programs; see
// tb_mips_single_cycle.sv for what is checked.

  logic        clk = 0, rst, load_we;
  logic [31:0] load_addr, load_data, pc, instr;
  logic        rf_we, dmem_we;
  logic [4:0]  rf_waddr;
  logic [31:0] rf_wdata, dmem_addr, dmem_wdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ------------------------------------------------------------ encoders
  function automatic logic [31:0] r_type(int rs, int rt, int rd, int sh, logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] i_type(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] add_ (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h20); endfunction
  function automatic logic [31:0] slt_ (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h2A); endfunction
  function automatic logic [31:0] sll_ (int rd, int rt, int sh); return r_type(0, rt, rd, sh, 6'h00); endfunction
  function automatic logic [31:0] jr_  (int rs);                 return r_type(rs, 0, 0, 0, 6'h08); endfunction
  function automatic logic [31:0] addi_(int rt, int rs, int imm); return i_type(6'h08, rs, rt, imm); endfunction
  function automatic logic [31:0] lw_  (int rt, int imm, int rs); return i_type(6'h23, rs, rt, imm); endfunction
  function automatic logic [31:0] sw_  (int rt, int imm, int rs); return i_type(6'h2B, rs, rt, imm); endfunction
  function automatic logic [31:0] beq_ (int rs, int rt, int off); return i_type(6'h04, rs, rt, off); endfunction
  function automatic logic [31:0] j_   (int word);               return {6'h02, 26'(word)}; endfunction
  function automatic logic [31:0] jal_ (int word);               return {6'h03, 26'(word)}; endfunction

  // ------------------------------------------------------------ reference model
  localparam logic [31:0] HALT = 32'h1000_FFFF;   // beq $0,$0,-1
  logic [31:0] prog [1024];
  int          prog_len;
  logic [31:0] m_pc;
  logic [31:0] m_reg [32];
  logic [31:0] m_mem [1024];

  // mechanism counters
  int n_add, n_addi, n_lw, n_sw, n_beq_taken, n_beq_not, n_j, n_sll, n_slt, n_jal, n_jr, n_r0;

  function automatic logic [31:0] sx(logic [15:0] v); return {{16{v[15]}}, v}; endfunction

  task automatic model_step();
    logic [31:0] ins, a, b, wv, pc4;
    logic [5:0]  op, fn;
    int          rs, rt, rd, dst;
    bit          wr;
    ins = prog[m_pc[11:2]];
    pc4 = m_pc + 4;
    op = ins[31:26]; fn = ins[5:0];
    rs = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
    a = m_reg[rs]; b = m_reg[rt];
    wr = 0; dst = 0; wv = 0;
    case (op)
      6'h00: case (fn)
        6'h20: begin wr = 1; dst = rd; wv = a + b; n_add++; end
        6'h2A: begin wr = 1; dst = rd; wv = ($signed(a) < $signed(b)) ? 1 : 0; n_slt++; end
        6'h00: begin wr = 1; dst = rd; wv = b << ins[10:6]; n_sll++; end
        6'h08: begin n_jr++; end
        default: ;
      endcase
      6'h08: begin wr = 1; dst = rt; wv = a + sx(ins[15:0]); n_addi++; end
      6'h23: begin wr = 1; dst = rt; wv = m_mem[10'((a + sx(ins[15:0])) >> 2)]; n_lw++; end
      6'h2B: begin
        m_mem[10'((a + sx(ins[15:0])) >> 2)] = b; n_sw++;
      end
      6'h03: begin wr = 1; dst = 31; wv = m_pc + 4; n_jal++; end
      6'h02: n_j++;
      6'h04: if (a == b) n_beq_taken++; else n_beq_not++;
      default: ;
    endcase
    // the processor must be about to commit exactly this
    checks++;
    if (rf_we !== wr || (wr && (rf_waddr !== 5'(dst) || rf_wdata !== wv))) begin
      failures++;
      $display("pc %h (%h): register write we=%b $%0d=%h, expected we=%b $%0d=%h",
               m_pc, ins, rf_we, rf_waddr, rf_wdata, wr, dst, wv);
    end
    checks++;
    if (dmem_we !== (op == 6'h2B) ||
        (op == 6'h2B && (dmem_addr[11:2] !== 10'((a + sx(ins[15:0])) >> 2) || dmem_wdata !== b))) begin
      failures++;
      $display("pc %h (%h): store we=%b [%h]=%h", m_pc, ins, dmem_we, dmem_addr, dmem_wdata);
    end
    if (wr && dst == 0) n_r0++;
    if (wr && dst != 0) m_reg[dst] = wv;
    // next PC
    if (op == 6'h04 && a == b)              m_pc = m_pc + 4 + (sx(ins[15:0]) << 2);
    else if (op == 6'h02 || op == 6'h03)    m_pc = {pc4[31:28], ins[25:0], 2'b00};
    else if (op == 6'h00 && fn == 6'h08)    m_pc = a;
    else                                    m_pc = m_pc + 4;
  endtask

  // ------------------------------------------------------------ run one program
  task automatic run_program(string name, int max_cycles);
    int cycles, executed;
    rst = 1; load_we = 0;
    checks++;
    if (prog_len > 1024) begin failures++; $display("%s does not fit the instruction memory", name); end
    @(posedge clk); #1;
    for (int i = 0; i < prog_len; i++) begin
      load_we = 1; load_addr = 32'(i * 4); load_data = prog[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    @(posedge clk); #1;
    rst = 0;
    m_pc = 0;
    foreach (m_reg[i]) m_reg[i] = '0;
    cycles = 0; executed = 0;
    while (cycles < max_cycles) begin
      checks++;
      if (pc !== m_pc || instr !== prog[m_pc[11:2]]) begin
        failures++;
        $display("%s cycle %0d: pc=%h instr=%h, expected pc=%h instr=%h", name, cycles, pc, instr, m_pc, prog[m_pc[11:2]]);
      end
      if (prog[m_pc[11:2]] == HALT) break;
      model_step();
      executed++;
      @(posedge clk); #1;
      cycles++;
    end
    checks++;
    if (prog[m_pc[11:2]] != HALT || cycles != executed) begin
      failures++;
      $display("%s: did not reach the halt loop at one instruction per cycle (%0d cycles, %0d instructions)", name, cycles, executed);
    end
    $display("%s: %0d instructions in %0d cycles", name, executed, cycles);
  endtask

  task automatic count(string what, int n);
    checks++;
    $display("  %-16s %0d", what, n);
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
  endtask

  initial begin
    int p;
    // ------------------------------------------------ program 1: hand-written
    p = 0;
    prog[p++] = addi_(1, 0, 10);        // 0  $1 = n
    prog[p++] = addi_(2, 0, 0);         // 1  $2 = sum
    prog[p++] = addi_(3, 0, 'h100);     // 2  $3 = array pointer
    prog[p++] = beq_(1, 0, 6);          // 3  loop: if n == 0 goto 10
    prog[p++] = add_(2, 2, 1);          // 4  sum += n
    prog[p++] = sw_(2, 0, 3);           // 5  mem[ptr] = sum
    prog[p++] = lw_(4, 0, 3);           // 6  $4 = mem[ptr]
    prog[p++] = addi_(3, 3, 4);         // 7  ptr += 4
    prog[p++] = addi_(1, 1, -1);        // 8  n--
    prog[p++] = j_(3);                  // 9  goto loop
    prog[p++] = jal_(15);               // 10 call func
    prog[p++] = slt_(6, 5, 2);          // 11 $6 = (-7 < 55) = 1
    prog[p++] = sll_(7, 2, 3);          // 12 $7 = sum << 3
    prog[p++] = lw_(9, -4, 3);          // 13 negative offset: last stored sum
    prog[p++] = j_(20);                 // 14 goto end
    prog[p++] = addi_(5, 0, -7);        // 15 func: $5 = -7
    prog[p++] = slt_(8, 2, 5);          // 16 $8 = (55 < -7) = 0
    prog[p++] = add_(0, 2, 2);          // 17 write to $0 is dropped
    prog[p++] = add_(11, 0, 2);         // 18 $11 = $0 + sum = 55
    prog[p++] = jr_(31);                // 19 return
    prog[p++] = HALT;                   // 20 end
    prog_len = p;
    run_program("program 1", 500);
    // hand-computed results of program 1 (sum of 1..10 = 55)
    checks++;
    if (m_reg[2] !== 32'd55 || m_reg[9] !== 32'd55 || m_reg[6] !== 32'd1 || m_reg[7] !== 32'd440 ||
        m_reg[8] !== 32'd0 || m_reg[31] !== 32'd44 || m_reg[10] !== 32'd0 || m_reg[11] !== 32'd55) begin
      failures++;
      $display("program 1 final registers wrong");
    end

    // ------------------------------------------------ program 2: random
    p = 0;
    for (int w = 0; w < 32; w++) prog[p++] = sw_(0, w * 4, 0);   // clear data region
    for (int k = 0; k < 900; k++) begin
      int kind, rd, rs, rt;
      kind = $urandom_range(0, 6);
      rd = $urandom_range(0, 31); rs = $urandom_range(0, 31); rt = $urandom_range(0, 31);
      case (kind)
        0: prog[p++] = add_(rd, rs, rt);
        1: prog[p++] = addi_(rt, rs, int'($urandom_range(0, 65535)));
        2: prog[p++] = slt_(rd, rs, rt);
        3: prog[p++] = sll_(rd, rt, $urandom_range(0, 31));
        4: prog[p++] = lw_(rt, $urandom_range(0, 31) * 4, 0);
        5: prog[p++] = sw_(rt, $urandom_range(0, 31) * 4, 0);
        default: prog[p++] = beq_(rs, ($urandom_range(0, 1) == 1) ? rs : rt, $urandom_range(0, 3));
      endcase
    end
    for (int k = 0; k < 4; k++) prog[p++] = add_(1, 1, 1);       // landing pad for last branches
    prog[p++] = HALT;
    prog_len = p;
    run_program("program 2", 5000);

    $display("mechanisms exercised:");
    count("add", n_add);
    count("addi", n_addi);
    count("lw", n_lw);
    count("sw", n_sw);
    count("beq taken", n_beq_taken);
    count("beq not taken", n_beq_not);
    count("j", n_j);
    count("jal", n_jal);
    count("jr", n_jr);
    count("sll", n_sll);
    count("slt", n_slt);
    count("$0 write dropped", n_r0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
