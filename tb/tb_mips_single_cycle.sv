// tb_mips_single_cycle: end-to-end testbench for the single-cycle processor,
// run with every parameter at its default.
//
// An instruction-set model written here, independent of the RTL, executes
// the same program one instruction per cycle. Each cycle, before the clock
// edge, the processor's PC, instruction, register write (enable, register,
// value) and memory write (enable, address, data) are compared with the
// model; at the end of each program the whole register file and data
// memory are compared as well.
//
// Part 1 runs a hand-written program (store 10..1 to memory, load and sum
// them, store the sum) whose result, 55, and the cycle on which the final
// store happens, 104, are worked out by hand: one instruction per cycle.
// Part 2 runs random programs that fill the whole instruction memory with
// the instruction mix 40% ALU, 20% loads, 10% stores, 20% branches and
// 10% jumps. Each mechanism of the design is counted and must occur: every
// one of the sixteen instructions, beq and bne both taken and not taken,
// sign and zero extension of a negative immediate, a discarded write to
// R0, and slt/slti returning 1. CPI = 1 is checked by comparing the
// retired-instruction count with the cycle count.
module tb_mips_single_cycle;
  import mips_pkg::*;

  localparam int unsigned IW = 1024;  // instruction memory words (default)
  localparam int unsigned DW = 1024;  // data memory words (default)
  localparam int NPROG  = 12;
  localparam int NCYC   = 3000;

  int checks = 0, failures = 0;
  logic        clk = 0, rst = 1;
  logic [31:0] pc, instr, reg_wdata, mem_addr, mem_wdata;
  logic        reg_we, mem_we;
  logic [4:0]  reg_waddr;

  mips_single_cycle dut (
    .clk(clk), .rst(rst), .pc(pc), .instr(instr),
    .reg_we(reg_we), .reg_waddr(reg_waddr), .reg_wdata(reg_wdata),
    .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NPROG * (NCYC + 10) + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ reference model
  logic [31:0] m_pc;
  logic [31:0] m_regs [32];
  logic [31:0] m_imem [IW];
  logic [31:0] m_dmem [DW];

  // Mechanism counters
  int n_op [string];
  int n_beq_t, n_beq_n, n_bne_t, n_bne_n, n_sext_neg, n_zext_neg, n_r0_write, n_slt_one;
  int n_retired, n_cycles;

  typedef struct {
    logic        reg_we;
    logic [4:0]  reg_waddr;
    logic [31:0] reg_wdata;
    logic        mem_we;
    logic [31:0] mem_addr;
    logic [31:0] mem_wdata;
    logic [31:0] next_pc;
  } step_t;

  function automatic string opname(logic [31:0] w);
    case (w[31:26])
      6'h00: case (w[5:0])
               6'h20: return "add"; 6'h22: return "sub"; 6'h24: return "and";
               6'h25: return "or";  6'h26: return "xor"; 6'h2a: return "slt";
               default: return "r?";
             endcase
      6'h08: return "addi"; 6'h0a: return "slti"; 6'h0c: return "andi";
      6'h0d: return "ori";  6'h0e: return "xori"; 6'h23: return "lw";
      6'h2b: return "sw";   6'h04: return "beq";  6'h05: return "bne";
      6'h02: return "j";
      default: return "?";
    endcase
  endfunction

  // Execute the instruction at m_pc in the model (no state change).
  function automatic step_t model_step();
    step_t s;
    logic [31:0] w, a, b, se, ze, pc4;
    logic [4:0]  rs, rt, rd;
    string nm;
    w   = m_imem[m_pc[11:2]];
    rs  = w[25:21]; rt = w[20:16]; rd = w[15:11];
    a   = (rs == 0) ? 32'h0 : m_regs[rs];
    b   = (rt == 0) ? 32'h0 : m_regs[rt];
    se  = {{16{w[15]}}, w[15:0]};
    ze  = {16'h0, w[15:0]};
    pc4 = m_pc + 4;
    s = '{reg_we: 0, reg_waddr: 0, reg_wdata: 0, mem_we: 0, mem_addr: 0, mem_wdata: 0, next_pc: pc4};
    nm = opname(w);
    case (nm)
      "add":  s = '{1, rd, a + b, 0, 0, 0, pc4};
      "sub":  s = '{1, rd, a - b, 0, 0, 0, pc4};
      "and":  s = '{1, rd, a & b, 0, 0, 0, pc4};
      "or":   s = '{1, rd, a | b, 0, 0, 0, pc4};
      "xor":  s = '{1, rd, a ^ b, 0, 0, 0, pc4};
      "slt":  s = '{1, rd, ($signed(a) < $signed(b)) ? 32'd1 : 32'd0, 0, 0, 0, pc4};
      "addi": s = '{1, rt, a + se, 0, 0, 0, pc4};
      "slti": s = '{1, rt, ($signed(a) < $signed(se)) ? 32'd1 : 32'd0, 0, 0, 0, pc4};
      "andi": s = '{1, rt, a & ze, 0, 0, 0, pc4};
      "ori":  s = '{1, rt, a | ze, 0, 0, 0, pc4};
      "xori": s = '{1, rt, a ^ ze, 0, 0, 0, pc4};
      "lw":   s = '{1, rt, m_dmem[10'((a + se) >> 2)], 0, 0, 0, pc4};
      "sw":   s = '{0, 0, 0, 1, a + se, b, pc4};
      "beq":  s.next_pc = (a == b) ? pc4 + (se << 2) : pc4;
      "bne":  s.next_pc = (a != b) ? pc4 + (se << 2) : pc4;
      "j":    s.next_pc = {pc4[31:28], w[25:0], 2'b00};
      default: ;
    endcase
    return s;
  endfunction

  function automatic void model_commit(step_t s);
    logic [31:0] w;
    string nm;
    w  = m_imem[m_pc[11:2]];
    nm = opname(w);
    n_op[nm] = n_op.exists(nm) ? n_op[nm] + 1 : 1;
    if (nm == "beq") begin if (s.next_pc != m_pc + 4) n_beq_t++; else n_beq_n++; end
    if (nm == "bne") begin if (s.next_pc != m_pc + 4) n_bne_t++; else n_bne_n++; end
    if (w[15] && (nm == "addi" || nm == "slti" || nm == "lw" || nm == "sw")) n_sext_neg++;
    if (w[15] && (nm == "andi" || nm == "ori" || nm == "xori")) n_zext_neg++;
    if (s.reg_we && s.reg_waddr == 0) n_r0_write++;
    if ((nm == "slt" || nm == "slti") && s.reg_wdata == 1) n_slt_one++;
    if (s.reg_we && s.reg_waddr != 0) m_regs[s.reg_waddr] = s.reg_wdata;
    if (s.mem_we) m_dmem[10'(s.mem_addr >> 2)] = s.mem_wdata;
    m_pc = s.next_pc;
    n_retired++;
  endfunction

  // ------------------------------------------------------------ encoders
  function automatic logic [31:0] enc_r(logic [5:0] fn, int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] enc_i(opcode_e op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] enc_j(int target_word);
    return {OP_J, 26'(target_word)};
  endfunction

  // ----------------------------------------------------- program loading
  task automatic load_state();
    rst = 1;  // hold the processor in reset while its state is replaced
    for (int i = 0; i < IW; i++) dut.u_imem.mem[i] = m_imem[i];
    for (int i = 0; i < DW; i++) dut.u_dmem.mem[i] = m_dmem[i];
    for (int r = 1; r < 32; r++) dut.u_regs.regs[r] = m_regs[r];
    m_regs[0] = 0;
    m_pc = 0;
  endtask

  // Run ncyc cycles from reset, comparing every cycle. Returns the cycle
  // index of the first store to address store_watch (or -1).
  task automatic run(input int ncyc, input logic [31:0] store_watch, output int store_cycle);
    step_t s;
    store_cycle = -1;
    @(negedge clk);
    rst = 1;
    @(posedge clk);
    #1;
    rst = 0;
    for (int c = 0; c < ncyc; c++) begin
      @(negedge clk);
      s = model_step();
      checks++;
      if (pc !== m_pc || instr !== m_imem[m_pc[11:2]] ||
          reg_we !== s.reg_we || (s.reg_we && (reg_waddr !== s.reg_waddr || reg_wdata !== s.reg_wdata)) ||
          mem_we !== s.mem_we || (s.mem_we && (mem_addr !== s.mem_addr || mem_wdata !== s.mem_wdata))) begin
        failures++;
        if (failures < 20)
          $display("FAIL cycle %0d pc=%h (model %h) instr=%h reg %b/%0d/%h (model %b/%0d/%h) mem %b/%h/%h (model %b/%h/%h)",
                   c, pc, m_pc, instr, reg_we, reg_waddr, reg_wdata, s.reg_we, s.reg_waddr, s.reg_wdata,
                   mem_we, mem_addr, mem_wdata, s.mem_we, s.mem_addr, s.mem_wdata);
      end
      if (s.mem_we && s.mem_addr == store_watch && store_cycle < 0) store_cycle = c;
      model_commit(s);
      n_cycles++;
    end
    @(negedge clk);
    for (int r = 1; r < 32; r++) begin
      checks++;
      if (dut.u_regs.regs[r] !== m_regs[r]) begin
        failures++;
        $display("FAIL final r%0d=%h model %h", r, dut.u_regs.regs[r], m_regs[r]);
      end
    end
    for (int i = 0; i < DW; i++) begin
      if (dut.u_dmem.mem[i] !== m_dmem[i]) begin
        failures++;
        $display("FAIL final mem[%0d]=%h model %h", i, dut.u_dmem.mem[i], m_dmem[i]);
      end
    end
    checks++;
  endtask

  // ------------------------------------------------- random program
  function automatic logic [31:0] rand_instr(int idx);
    int p, rd, rs, rt, k;
    p  = $urandom_range(99);
    rs = $urandom_range(31);
    rt = $urandom_range(31);
    rd = $urandom_range(31);
    if (rd == 1) rd = 0;   // r1 is the memory base register
    if (rt == 1) rt = 2;
    if (p < 40) begin                    // 40% ALU
      k = $urandom_range(10);
      case (k)
        0: return enc_r(FN_ADD, rd, rs, rt);
        1: return enc_r(FN_SUB, rd, rs, rt);
        2: return enc_r(FN_AND, rd, rs, rt);
        3: return enc_r(FN_OR,  rd, rs, rt);
        4: return enc_r(FN_XOR, rd, rs, rt);
        5: return enc_r(FN_SLT, rd, rs, rt);
        6: return enc_i(OP_ADDI, rt, rs, $urandom);
        7: return enc_i(OP_SLTI, rt, rs, $urandom);
        8: return enc_i(OP_ANDI, rt, rs, $urandom);
        9: return enc_i(OP_ORI,  rt, rs, $urandom);
        default: return enc_i(OP_XORI, rt, rs, $urandom);
      endcase
    end else if (p < 60) begin           // 20% loads
      return enc_i(OP_LW, rt, ($urandom_range(3) == 0) ? 0 : 1, 4 * $urandom_range(DW / 2 - 1));
    end else if (p < 70) begin           // 10% stores
      return enc_i(OP_SW, rt, ($urandom_range(3) == 0) ? 0 : 1, 4 * $urandom_range(DW / 2 - 1));
    end else if (p < 90) begin           // 20% branches
      // Operands drawn from few registers so that both outcomes occur.
      rs = $urandom_range(3) == 0 ? 0 : $urandom_range(2, 4);
      rt = $urandom_range(3) == 0 ? 0 : $urandom_range(2, 4);
      return enc_i(($urandom_range(1) == 1) ? OP_BEQ : OP_BNE, rt, rs, $urandom_range(1, 24) - 8);
    end else begin                       // 10% jumps
      return enc_j($urandom_range(IW - 1));
    end
  endfunction

  // ------------------------------------------------------------ stimulus
  initial begin
    int sc;
    static string need [] = '{"add", "sub", "and", "or", "xor", "slt", "addi", "slti",
                       "andi", "ori", "xori", "lw", "sw", "beq", "bne", "j"};

    // Part 1: directed program
    foreach (m_imem[i]) m_imem[i] = enc_j(i);   // unused words: self-loops
    foreach (m_dmem[i]) m_dmem[i] = $urandom;
    foreach (m_regs[r]) m_regs[r] = $urandom;
    m_imem[0]  = enc_i(OP_ADDI, 1, 0, 10);
    m_imem[1]  = enc_i(OP_ADDI, 2, 0, 32'h100);
    m_imem[2]  = enc_i(OP_SW,   1, 2, 0);        // L1
    m_imem[3]  = enc_i(OP_ADDI, 2, 2, 4);
    m_imem[4]  = enc_i(OP_ADDI, 1, 1, -1);
    m_imem[5]  = enc_i(OP_BNE,  0, 1, -4);       // bne r1, r0, L1
    m_imem[6]  = enc_i(OP_ADDI, 2, 0, 32'h100);
    m_imem[7]  = enc_i(OP_ADDI, 3, 0, 0);
    m_imem[8]  = enc_i(OP_ADDI, 4, 0, 10);
    m_imem[9]  = enc_i(OP_LW,   5, 2, 0);        // L2
    m_imem[10] = enc_r(FN_ADD,  3, 3, 5);
    m_imem[11] = enc_i(OP_ADDI, 2, 2, 4);
    m_imem[12] = enc_i(OP_ADDI, 4, 4, -1);
    m_imem[13] = enc_i(OP_BEQ,  0, 4, 1);        // beq r4, r0, Done
    m_imem[14] = enc_j(9);
    m_imem[15] = enc_i(OP_SW,   3, 0, 0);        // Done: mem[0] = sum
    m_imem[16] = enc_r(FN_SLT,  6, 0, 3);
    m_imem[17] = enc_j(17);
    load_state();
    run(200, 32'h0, sc);
    checks++;
    if (sc != 104) begin failures++; $display("FAIL sum store at cycle %0d, expected 104", sc); end
    checks++;
    if (dut.u_dmem.mem[0] !== 32'd55 || dut.u_regs.regs[3] !== 32'd55 || dut.u_regs.regs[6] !== 32'd1) begin
      failures++;
      $display("FAIL sum program: mem[0]=%0d r3=%0d r6=%0d", dut.u_dmem.mem[0], dut.u_regs.regs[3], dut.u_regs.regs[6]);
    end

    // Part 2: random programs with the instruction mix
    for (int p = 0; p < NPROG; p++) begin
      foreach (m_imem[i]) m_imem[i] = rand_instr(i);
      m_imem[0] = enc_i(OP_ADDI, 1, 0, 32'h400);  // base register r1
      foreach (m_dmem[i]) m_dmem[i] = ($urandom_range(3) == 0) ? 32'h0 : $urandom;
      foreach (m_regs[r]) m_regs[r] = ($urandom_range(2) == 0) ? 32'h0 : $urandom;
      load_state();
      run(NCYC, 32'hffff_ffff, sc);
    end

    // CPI = 1: one instruction retired per cycle
    checks++;
    if (n_retired != n_cycles) begin failures++; $display("FAIL retired %0d in %0d cycles", n_retired, n_cycles); end

    // Every mechanism must have happened
    foreach (need[i]) begin
      checks++;
      if (!n_op.exists(need[i])) begin failures++; $display("FAIL never executed %s", need[i]); end
      else $display("  %-5s executed %0d times", need[i], n_op[need[i]]);
    end
    $display("  beq taken %0d / not taken %0d, bne taken %0d / not taken %0d", n_beq_t, n_beq_n, n_bne_t, n_bne_n);
    $display("  negative imm sign-extended %0d, zero-extended %0d, R0 writes dropped %0d, slt=1 %0d",
             n_sext_neg, n_zext_neg, n_r0_write, n_slt_one);
    $display("  %0d instructions in %0d cycles", n_retired, n_cycles);
    checks++;
    if (n_beq_t == 0 || n_beq_n == 0 || n_bne_t == 0 || n_bne_n == 0 ||
        n_sext_neg == 0 || n_zext_neg == 0 || n_r0_write == 0 || n_slt_one == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
