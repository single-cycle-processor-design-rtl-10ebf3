// mips_single_cycle: single-cycle processor for a 16-instruction MIPS
// subset (add, sub, and, or, xor, slt, addi, slti, andi, ori, xori, lw, sw,
// beq, bne, j).
//
// Every instruction completes in one clock cycle. In that cycle the PC
// addresses the instruction memory; the instruction's Rs and Rt fields
// read the register file; the main control decodes the opcode and the ALU
// control combines ALUOp with funct; the extender widens imm16; the ALUSrc
// mux chooses BusB or the immediate as the second ALU operand; the ALU
// computes a result or a memory address; the data memory is read or
// written; the MemtoReg mux puts the ALU result or the loaded word on BusW;
// and the next-PC block forms the branch or jump target. On the rising
// clock edge the PC, the destination register (Rt or Rd, by RegDst) and
// the data memory word are all updated together.
//
// The PC register holds only the word address PC[31:2]; the +1 adder
// increments those 30 bits. Branch targets are PC + 4 + 4 * sign_ext(imm16);
// jump targets are {PC+4 [31:28], imm26, 00}. The ALU's overflow output is
// not used: the subset has no exceptions.
//
// Interface: clk, and rst (synchronous, active high) that sets the PC to
// RESET_PC; while rst is held, no register or memory word is written. The remaining ports only expose what the processor does each
// cycle (PC, instruction, register write, memory write) so that it can be
// observed; they take no part in its operation. Program and data are
// loaded through IMEM_INIT / DMEM_INIT or by a testbench.
//
// The datapath and control follow the single-cycle design it is drawn
// from. Memory sizes, the reset and the observation ports are this
// design's own.
module mips_single_cycle
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter string       IMEM_INIT  = "",
  parameter string       DMEM_INIT  = "",
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        reg_we,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata
);
  // Fetch
  logic [29:0] pc_q, pc_inc, pc_next, target;
  logic        pc_src, unused_inc_cout;

  // Instruction fields
  logic [5:0]  op, funct;
  logic [4:0]  rs, rt, rd;
  logic [15:0] imm16;
  logic [25:0] imm26;

  // Control
  ctrl_t       ctrl_dec, ctrl;
  alu_ctrl_e   alu_ctrl;

  // Datapath
  logic [4:0]  rw;
  logic [31:0] bus_a, bus_b, bus_w, ext_imm, alu_b, alu_result, mem_rdata;
  logic        zero, unused_overflow;

  // ----------------------------------------------------------------- PC
  register_en #(.WIDTH(30), .RESET_VAL(RESET_PC[31:2])) u_pc (
    .clk(clk), .rst(rst), .we(1'b1), .d(pc_next), .q(pc_q)
  );

  adder #(.WIDTH(30)) u_pc_inc (
    .a(pc_q), .b(30'd1), .sum(pc_inc), .cout(unused_inc_cout)
  );

  mux2 #(.WIDTH(30)) u_pc_mux (
    .d0(pc_inc), .d1(target), .sel(pc_src), .y(pc_next)
  );

  instr_mem #(.WORDS(IMEM_WORDS), .INIT_FILE(IMEM_INIT)) u_imem (
    .addr({pc_q, 2'b00}), .instruction(instr)
  );

  assign op    = instr[31:26];
  assign rs    = instr[25:21];
  assign rt    = instr[20:16];
  assign rd    = instr[15:11];
  assign funct = instr[5:0];
  assign imm16 = instr[15:0];
  assign imm26 = instr[25:0];

  // ------------------------------------------------------------ control
  main_control u_main_ctrl (.op(op), .ctrl(ctrl_dec));

  // No state other than the PC changes while reset is held.
  always_comb begin
    ctrl           = ctrl_dec;
    ctrl.reg_write = ctrl_dec.reg_write & ~rst;
    ctrl.mem_write = ctrl_dec.mem_write & ~rst;
  end

  alu_control u_alu_ctrl (.alu_op(ctrl.alu_op), .funct(funct), .alu_ctrl(alu_ctrl));

  // ----------------------------------------------------------- datapath
  mux2 #(.WIDTH(5)) u_regdst_mux (.d0(rt), .d1(rd), .sel(ctrl.reg_dst), .y(rw));

  register_file u_regs (
    .clk(clk), .ra(rs), .rb(rt), .rw(rw), .reg_write(ctrl.reg_write),
    .bus_w(bus_w), .bus_a(bus_a), .bus_b(bus_b)
  );

  extender u_ext (.imm16(imm16), .ext_op(ctrl.ext_op), .ext32(ext_imm));

  mux2 #(.WIDTH(32)) u_alusrc_mux (.d0(bus_b), .d1(ext_imm), .sel(ctrl.alu_src), .y(alu_b));

  alu u_alu (
    .a(bus_a), .b(alu_b), .ctrl(alu_fields(alu_ctrl)),
    .result(alu_result), .zero(zero), .overflow(unused_overflow)
  );

  data_mem #(.WORDS(DMEM_WORDS), .INIT_FILE(DMEM_INIT)) u_dmem (
    .clk(clk), .addr(alu_result), .data_in(bus_b),
    .mem_read(ctrl.mem_read), .mem_write(ctrl.mem_write), .data_out(mem_rdata)
  );

  mux2 #(.WIDTH(32)) u_memtoreg_mux (.d0(alu_result), .d1(mem_rdata), .sel(ctrl.mem_to_reg), .y(bus_w));

  next_pc u_next_pc (
    .inc_pc(pc_inc), .imm16(imm16), .imm26(imm26), .zero(zero),
    .beq(ctrl.beq), .bne(ctrl.bne), .j(ctrl.j), .target(target), .pc_src(pc_src)
  );

  // ------------------------------------------------------- observation
  assign pc        = {pc_q, 2'b00};
  assign reg_we    = ctrl.reg_write;
  assign reg_waddr = rw;
  assign reg_wdata = bus_w;
  assign mem_we    = ctrl.mem_write;
  assign mem_addr  = alu_result;
  assign mem_wdata = bus_b;

  // A jump and a branch are never requested together.
  assert property (@(posedge clk) disable iff (rst) !(ctrl.j && (ctrl.beq || ctrl.bne)));
endmodule
