// extender: 16-to-32-bit immediate extender.
//
// The lower 16 output bits are the immediate itself. Each of the upper 16
// bits is the AND of ext_op and imm16[15]: with ext_op = 1 the sign bit is
// replicated (sign extension, for addi, slti, lw, sw), with ext_op = 0 the
// upper half is zero (zero extension, for andi, ori, xori). This is the
// wiring-plus-one-AND-gate extender of the reference design. Combinational.
module extender (
  input  logic [15:0] imm16,
  input  logic        ext_op,
  output logic [31:0] ext32
);
  logic upper;
  assign upper = ext_op & imm16[15];
  assign ext32 = {{16{upper}}, imm16};
endmodule
