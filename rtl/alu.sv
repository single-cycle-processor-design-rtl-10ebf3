// alu: 32-bit multifunction ALU.
//
// Four units work in parallel and a 4-way result multiplexer picks one:
//   - shifter:    B shifted by A[4:0] (none / SLL / SRL / SRA)
//   - SLT:        1 if A < B as signed numbers, else 0
//   - arithmetic: A + B, or A - B formed as A + ~B + 1 (the B input passes
//                 through XOR gates driven by the SUB bit, which is also the
//                 adder's carry in)
//   - logic unit: AND / OR / NOR / XOR
// SLT runs the adder as a subtractor and takes sign XOR overflow of the
// difference, so it stays correct when A - B overflows. zero is the NOR of
// all result bits; overflow is the two's-complement overflow of the adder.
// Combinational; control arrives as the alu_fields_t select word
// (mips_pkg::alu_fields maps an ALUCtrl code onto it).
//
// The units, their select codes and the sign/overflow SLT follow the
// multifunction ALU of the reference design. Which operand feeds the shifter and which
// supplies the shift amount is this design's reading: B is shifted by the
// five low bits of A.
module alu
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_fields_t ctrl,
  output logic [31:0] result,
  output logic        zero,
  output logic        overflow
);
  logic [31:0] shift_res;
  logic [31:0] b_inv;
  logic [31:0] sum;
  logic        sign;
  logic        less;
  logic [31:0] logic_res;

  shifter u_shifter (
    .data  (b),
    .shamt (a[4:0]),
    .op    (ctrl.shift_op),
    .result(shift_res)
  );

  // Adder / subtractor
  assign b_inv    = b ^ {32{ctrl.sub}};
  assign sum      = a + b_inv + {31'd0, ctrl.sub};
  assign sign     = sum[31];
  assign overflow = (a[31] == b_inv[31]) && (sum[31] != a[31]);
  assign less     = sign ^ overflow;

  // Logic unit
  always_comb begin
    unique case (ctrl.logic_op)
      LG_AND:  logic_res = a & b;
      LG_OR:   logic_res = a | b;
      LG_NOR:  logic_res = ~(a | b);
      LG_XOR:  logic_res = a ^ b;
      default: logic_res = a & b;
    endcase
  end

  // Result multiplexer
  always_comb begin
    unique case (ctrl.sel)
      SEL_SHIFT: result = shift_res;
      SEL_SLT:   result = {31'd0, less};
      SEL_ARITH: result = sum;
      SEL_LOGIC: result = logic_res;
      default:   result = sum;
    endcase
  end

  assign zero = ~|result;
endmodule
