// main_control: opcode decoder of the single-cycle processor.
//
// A decoder turns the 6-bit opcode into one line per instruction class
// (R-type, addi, slti, andi, ori, xori, lw, sw, beq, bne, j); logic
// equations on those lines produce the ten datapath control signals and
// the ALUOp request for the ALU control:
//   RegDst   = R-type               ExtOp    = not (andi + ori + xori)
//   RegWrite = R-type + addi + slti + andi + ori + xori + lw
//   ALUSrc   = not (R-type + beq + bne)
//   MemRead  = lw   MemWrite = sw   MemtoReg = lw
//   Beq = beq   Bne = bne   J = j
// ALUOp is R-type (look at funct), ADD for addi/lw/sw, SUB for beq/bne, and
// the matching operation for slti/andi/ori/xori. Combinational.
//
// The signal values follow the main control table of the reference design. Where the
// table has a don't-care, the equations above fix the value. RegWrite is
// written as the OR of the instructions that write a register rather than
// as not (sw + beq + bne + j): the two agree on all sixteen instructions,
// and this way an opcode outside the subset writes nothing and behaves as
// a no-op (the reference design does not say what such an opcode does).
module main_control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  output ctrl_t      ctrl
);
  logic is_r, is_addi, is_slti, is_andi, is_ori, is_xori;
  logic is_lw, is_sw, is_beq, is_bne, is_j;

  // Decoder
  assign is_r    = (op == OP_RTYPE);
  assign is_addi = (op == OP_ADDI);
  assign is_slti = (op == OP_SLTI);
  assign is_andi = (op == OP_ANDI);
  assign is_ori  = (op == OP_ORI);
  assign is_xori = (op == OP_XORI);
  assign is_lw   = (op == OP_LW);
  assign is_sw   = (op == OP_SW);
  assign is_beq  = (op == OP_BEQ);
  assign is_bne  = (op == OP_BNE);
  assign is_j    = (op == OP_J);

  // Logic equations
  always_comb begin
    ctrl.reg_dst    = is_r;
    ctrl.reg_write  = is_r | is_addi | is_slti | is_andi | is_ori | is_xori | is_lw;
    ctrl.ext_op     = ~(is_andi | is_ori | is_xori);
    ctrl.alu_src    = ~(is_r | is_beq | is_bne);
    ctrl.beq        = is_beq;
    ctrl.bne        = is_bne;
    ctrl.j          = is_j;
    ctrl.mem_read   = is_lw;
    ctrl.mem_write  = is_sw;
    ctrl.mem_to_reg = is_lw;
    if (is_r)                  ctrl.alu_op = ALUOP_RTYPE;
    else if (is_slti)          ctrl.alu_op = ALUOP_SLT;
    else if (is_andi)          ctrl.alu_op = ALUOP_AND;
    else if (is_ori)           ctrl.alu_op = ALUOP_OR;
    else if (is_xori)          ctrl.alu_op = ALUOP_XOR;
    else if (is_beq | is_bne)  ctrl.alu_op = ALUOP_SUB;
    else                       ctrl.alu_op = ALUOP_ADD;
  end
endmodule
