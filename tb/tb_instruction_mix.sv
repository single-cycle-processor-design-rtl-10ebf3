// tb_instruction_mix: runs the instruction-mix workload on the processor
// at its default parameters.
//
// The program is 1000 instructions in random order with exactly the mix
// 40% ALU (400), 20% loads (200), 10% stores (100), 20% branches (200) and
// 10% jumps (100), followed by a jump to itself. Every branch has offset 0
// and every jump targets the next word, so whether taken or not, control
// always reaches the next instruction: the dynamic mix equals the static
// one and the program must end after exactly 1000 cycles. Each cycle the
// PC, instruction, register write and memory write are compared with an
// instruction-set model in this file; the register file and data memory
// are compared at the end.
//
// From the executed class counts the testbench also works out the classic
// comparison for this mix: a single-cycle clock of 880 ps (the load path:
// 200 ps memory + 150 ps register read + 180 ps ALU + 200 ps memory +
// 150 ps register write) against a 200 ps multicycle clock with 4, 5, 4, 3
// and 2 cycles for ALU, load, store, branch and jump. It checks the cycle
// count of this processor (CPI = 1), the average multicycle CPI of 3.8 and
// the resulting speedup of 880 / 760.
module tb_instruction_mix;
  import mips_pkg::*;

  localparam int unsigned IW = 1024;
  localparam int unsigned DW = 1024;
  localparam int N_ALU = 400, N_LW = 200, N_SW = 100, N_BR = 200, N_J = 100;
  localparam int N = N_ALU + N_LW + N_SW + N_BR + N_J;

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
    repeat (5000) @(posedge clk);
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

  int n_op [string];
  int n_beq_t, n_beq_n, n_bne_t, n_bne_n, n_sext_neg, n_zext_neg, n_r0_write, n_slt_one;
  int n_retired;

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

  // class: 0 ALU, 1 load, 2 store, 3 branch, 4 jump
  function automatic int class_of(string nm);
    case (nm)
      "lw": return 1; "sw": return 2; "beq", "bne": return 3; "j": return 4;
      default: return 0;
    endcase
  endfunction

  initial begin
    int kinds [N];
    int cls_count [5];
    int ncyc, halt_cycle, n_taken, n_branches;
    step_t s;
    longint single_ps, multi_ps, multi_cycles;

    // Build the program: class list, shuffled
    for (int i = 0; i < N; i++)
      kinds[i] = (i < N_ALU) ? 0 : (i < N_ALU + N_LW) ? 1 : (i < N_ALU + N_LW + N_SW) ? 2 :
                 (i < N_ALU + N_LW + N_SW + N_BR) ? 3 : 4;
    kinds.shuffle();
    // Word 0 sets the base register r1; it must be one of the ALU instructions.
    for (int i = 0; i < N; i++)
      if (kinds[i] == 0) begin kinds[i] = kinds[0]; kinds[0] = 0; break; end
    foreach (m_imem[i]) m_imem[i] = {OP_J, 26'(i)};
    m_imem[0] = enc_i(OP_ADDI, 1, 0, 32'h400);   // base register r1 (part of the ALU share)
    kinds[0] = 0;
    for (int i = 1; i < N; i++) begin
      int rs, rt, rd;
      rs = $urandom_range(31); rt = $urandom_range(2, 31); rd = $urandom_range(31);
      if (rd == 1) rd = 0;
      case (kinds[i])
        0: case ($urandom_range(10))
             0: m_imem[i] = enc_r(FN_ADD, rd, rs, rt);
             1: m_imem[i] = enc_r(FN_SUB, rd, rs, rt);
             2: m_imem[i] = enc_r(FN_AND, rd, rs, rt);
             3: m_imem[i] = enc_r(FN_OR,  rd, rs, rt);
             4: m_imem[i] = enc_r(FN_XOR, rd, rs, rt);
             5: m_imem[i] = enc_r(FN_SLT, rd, rs, rt);
             6: m_imem[i] = enc_i(OP_ADDI, rt, rs, $urandom);
             7: m_imem[i] = enc_i(OP_SLTI, rt, rs, $urandom);
             8: m_imem[i] = enc_i(OP_ANDI, rt, rs, $urandom);
             9: m_imem[i] = enc_i(OP_ORI,  rt, rs, $urandom);
             default: m_imem[i] = enc_i(OP_XORI, rt, rs, $urandom);
           endcase
        1: m_imem[i] = enc_i(OP_LW, rt, 1, 4 * $urandom_range(DW / 2 - 1));
        2: m_imem[i] = enc_i(OP_SW, rt, 1, 4 * $urandom_range(DW / 2 - 1));
        3: m_imem[i] = enc_i(($urandom_range(1) == 1) ? OP_BEQ : OP_BNE,
                             $urandom_range(0, 3), $urandom_range(0, 3), 0);
        default: m_imem[i] = {OP_J, 26'(i + 1)};
      endcase
    end
    m_imem[N] = {OP_J, 26'(N)};                  // halt: jump to itself
    foreach (m_dmem[i]) m_dmem[i] = $urandom;
    foreach (m_regs[r]) m_regs[r] = ($urandom_range(2) == 0) ? 32'h0 : $urandom;
    m_regs[0] = 0;
    m_pc = 0;
    for (int i = 0; i < IW; i++) dut.u_imem.mem[i] = m_imem[i];
    for (int i = 0; i < DW; i++) dut.u_dmem.mem[i] = m_dmem[i];
    for (int r = 1; r < 32; r++) dut.u_regs.regs[r] = m_regs[r];

    @(posedge clk);
    #1;
    rst = 0;
    halt_cycle = -1;
    n_taken = 0;
    n_branches = 0;
    ncyc = 0;
    while (halt_cycle < 0 && ncyc < 2 * N) begin
      @(negedge clk);
      if (m_pc == 32'(4 * N)) halt_cycle = ncyc;
      s = model_step();
      checks++;
      if (pc !== m_pc || instr !== m_imem[m_pc[11:2]] ||
          reg_we !== s.reg_we || (s.reg_we && (reg_waddr !== s.reg_waddr || reg_wdata !== s.reg_wdata)) ||
          mem_we !== s.mem_we || (s.mem_we && (mem_addr !== s.mem_addr || mem_wdata !== s.mem_wdata))) begin
        failures++;
        if (failures < 20)
          $display("FAIL cycle %0d pc=%h (model %h) instr=%h", ncyc, pc, m_pc, instr);
      end
      if (halt_cycle < 0) begin
        logic [31:0] w, a, b;
        w = m_imem[m_pc[11:2]];
        a = m_regs[w[25:21]];
        b = m_regs[w[20:16]];
        cls_count[class_of(opname(w))]++;
        if ((opname(w) == "beq" && a == b) || (opname(w) == "bne" && a != b)) n_taken++;
        if (opname(w) == "beq" || opname(w) == "bne") n_branches++;
      end
      model_commit(s);
      ncyc++;
    end
    @(negedge clk);
    for (int r = 1; r < 32; r++) begin
      checks++;
      if (dut.u_regs.regs[r] !== m_regs[r]) begin
        failures++;
        $display("FAIL final r%0d=%h model %h", r, dut.u_regs.regs[r], m_regs[r]);
      end
    end
    checks++;
    for (int i = 0; i < DW; i++)
      if (dut.u_dmem.mem[i] !== m_dmem[i]) begin
        failures++;
        $display("FAIL final mem[%0d]=%h model %h", i, dut.u_dmem.mem[i], m_dmem[i]);
      end

    // One instruction per cycle: the halt is reached after exactly N cycles
    checks++;
    if (halt_cycle != N) begin failures++; $display("FAIL halt reached at cycle %0d, expected %0d", halt_cycle, N); end
    // The executed mix is the intended one
    checks++;
    if (cls_count[0] != N_ALU || cls_count[1] != N_LW || cls_count[2] != N_SW ||
        cls_count[3] != N_BR || cls_count[4] != N_J) begin
      failures++;
      $display("FAIL executed mix %p", cls_count);
    end
    checks++;
    if (n_taken == 0 || n_taken == n_branches) begin
      failures++;
      $display("FAIL branches were not both taken and not taken");
    end

    // Single-cycle versus multicycle for this mix
    single_ps    = longint'(halt_cycle) * 880;
    multi_cycles = 4 * cls_count[0] + 5 * cls_count[1] + 4 * cls_count[2] + 3 * cls_count[3] + 2 * cls_count[4];
    multi_ps     = multi_cycles * 200;
    $display("  executed: %0d ALU, %0d loads, %0d stores, %0d branches (%0d taken), %0d jumps in %0d cycles",
             cls_count[0], cls_count[1], cls_count[2], cls_count[3], n_taken, cls_count[4], halt_cycle);
    $display("  single-cycle: %0d cycles x 880 ps = %0d ps; multicycle: %0d cycles x 200 ps = %0d ps; speedup %0d.%02d",
             halt_cycle, single_ps, multi_cycles, multi_ps, single_ps / multi_ps,
             ((1000 * single_ps / multi_ps + 5) / 10) % 100);
    checks++;
    if (multi_cycles != 3800 || single_ps != 880000 || ((1000 * single_ps / multi_ps + 5) / 10) != 116) begin
      failures++;
      $display("FAIL performance arithmetic");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
