// shifter: 32-bit shifter of the multifunction ALU.
//
// Shifts data by shamt (0..31) places: SH_NONE passes data through, SH_SLL
// shifts left filling zeros, SH_SRL shifts right filling zeros, SH_SRA
// shifts right replicating the sign bit. Combinational. The four operations
// and their 2-bit codes follow the reference ALU, which shows the shifter
// only as a box; it is written here with plain shift operators.
module shifter
  import mips_pkg::*;
(
  input  logic [31:0] data,
  input  logic [4:0]  shamt,
  input  shift_op_e   op,
  output logic [31:0] result
);
  always_comb begin
    unique case (op)
      SH_NONE: result = data;
      SH_SLL:  result = data << shamt;
      SH_SRL:  result = data >> shamt;
      SH_SRA:  result = 32'($signed(data) >>> shamt);
      default: result = data;
    endcase
  end
endmodule
