// alu_control: produces the 4-bit ALUCtrl code for the ALU.
//
// For R-type instructions (ALUOp = ALUOP_RTYPE) the code is the low four
// bits of the funct field: add 0000, sub 0010, and 0100, or 0101, xor 0110,
// slt 1010. For every other instruction ALUOp names the operation directly
// and the funct field is ignored. Combinational.
//
// The encoding and the truth table follow the reference design; the ALUOp encoding is
// this design's own (see mips_pkg). An R-type funct outside the subset
// yields its low four bits unchanged; the ALU treats codes it does not know
// as ADD.
module alu_control
  import mips_pkg::*;
(
  input  alu_op_e    alu_op,
  input  logic [5:0] funct,
  output alu_ctrl_e  alu_ctrl
);
  always_comb begin
    unique case (alu_op)
      ALUOP_RTYPE: alu_ctrl = alu_ctrl_e'(funct[3:0]);
      ALUOP_SUB:   alu_ctrl = ALU_SUB;
      ALUOP_AND:   alu_ctrl = ALU_AND;
      ALUOP_OR:    alu_ctrl = ALU_OR;
      ALUOP_XOR:   alu_ctrl = ALU_XOR;
      ALUOP_SLT:   alu_ctrl = ALU_SLT;
      default:     alu_ctrl = ALU_ADD;
    endcase
  end
endmodule
