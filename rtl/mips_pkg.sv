// mips_pkg: types and constants shared by the single-cycle MIPS-subset
// processor.
//
// Holds the opcode and funct codes of the sixteen supported instructions, the
// 4-bit ALUCtrl encoding, the ALUOp values that the main control hands to the
// ALU control, the field-level ALU control word of the multifunction ALU, the
// bundle of main-control signals, and one function that maps an ALUCtrl code
// onto the ALU's own select fields.
//
// Opcodes, funct codes and the ALUCtrl encoding follow the instruction
// tables of the reference design (ALUCtrl is the low four bits of the funct code of
// the matching R-type instruction). The ALUOp encoding is this design's
// choice: a 3-bit enumeration with one value per operation the main
// control can request, plus one for "R-type, look at funct".
package mips_pkg;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_BEQ   = 6'h04,
    OP_BNE   = 6'h05,
    OP_ADDI  = 6'h08,
    OP_SLTI  = 6'h0a,
    OP_ANDI  = 6'h0c,
    OP_ORI   = 6'h0d,
    OP_XORI  = 6'h0e,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2b
  } opcode_e;

  // ---------------------------------------------------- R-type funct codes
  typedef enum logic [5:0] {
    FN_ADD = 6'h20,
    FN_SUB = 6'h22,
    FN_AND = 6'h24,
    FN_OR  = 6'h25,
    FN_XOR = 6'h26,
    FN_SLT = 6'h2a
  } funct_e;

  // ------------------------------------------------- 4-bit ALUCtrl encoding
  typedef enum logic [3:0] {
    ALU_ADD = 4'b0000,
    ALU_SUB = 4'b0010,
    ALU_AND = 4'b0100,
    ALU_OR  = 4'b0101,
    ALU_XOR = 4'b0110,
    ALU_SLT = 4'b1010
  } alu_ctrl_e;

  // ----------------------------------- ALUOp: main control -> ALU control
  typedef enum logic [2:0] {
    ALUOP_ADD   = 3'd0,
    ALUOP_SUB   = 3'd1,
    ALUOP_AND   = 3'd2,
    ALUOP_OR    = 3'd3,
    ALUOP_XOR   = 3'd4,
    ALUOP_SLT   = 3'd5,
    ALUOP_RTYPE = 3'd6
  } alu_op_e;

  // ------------------------------- select fields of the multifunction ALU
  typedef enum logic [1:0] {
    SH_NONE = 2'b00,
    SH_SLL  = 2'b01,
    SH_SRL  = 2'b10,
    SH_SRA  = 2'b11
  } shift_op_e;

  typedef enum logic [1:0] {
    LG_AND = 2'b00,
    LG_OR  = 2'b01,
    LG_NOR = 2'b10,
    LG_XOR = 2'b11
  } logic_op_e;

  typedef enum logic [1:0] {
    SEL_SHIFT = 2'b00,
    SEL_SLT   = 2'b01,
    SEL_ARITH = 2'b10,
    SEL_LOGIC = 2'b11
  } alu_sel_e;

  typedef struct packed {
    shift_op_e shift_op;  // shifter operation
    logic      sub;       // arithmetic operation: 0 = ADD, 1 = SUB
    logic_op_e logic_op;  // logic unit operation
    alu_sel_e  sel;       // result multiplexer select
  } alu_fields_t;

  // ------------------------------------------------ main control signals
  typedef struct packed {
    logic    reg_dst;    // 1: write Rd, 0: write Rt
    logic    reg_write;  // write BusW into the register file
    logic    ext_op;     // 1: sign-extend imm16, 0: zero-extend
    logic    alu_src;    // 1: second ALU operand is the extended immediate
    alu_op_e alu_op;     // operation request to the ALU control
    logic    beq;        // branch if equal
    logic    bne;        // branch if not equal
    logic    j;          // jump
    logic    mem_read;   // read data memory
    logic    mem_write;  // write data memory
    logic    mem_to_reg; // 1: BusW = memory data, 0: BusW = ALU result
  } ctrl_t;

  // Map an ALUCtrl code to the select fields of the multifunction ALU.
  // SUB and SLT both run the adder as a subtractor; SLT then takes the
  // sign/overflow comparison instead of the sum.
  function automatic alu_fields_t alu_fields(alu_ctrl_e c);
    alu_fields_t f;
    f.shift_op = SH_NONE;
    f.sub      = 1'b0;
    f.logic_op = LG_AND;
    f.sel      = SEL_ARITH;
    unique case (c)
      ALU_ADD: f.sel = SEL_ARITH;
      ALU_SUB: begin f.sel = SEL_ARITH; f.sub = 1'b1; end
      ALU_AND: begin f.sel = SEL_LOGIC; f.logic_op = LG_AND; end
      ALU_OR:  begin f.sel = SEL_LOGIC; f.logic_op = LG_OR;  end
      ALU_XOR: begin f.sel = SEL_LOGIC; f.logic_op = LG_XOR; end
      ALU_SLT: begin f.sel = SEL_SLT;   f.sub = 1'b1; end
      default: f.sel = SEL_ARITH;
    endcase
    return f;
  endfunction

endpackage
