// next_pc: branch / jump target and PCSrc logic.
//
// Works on 30-bit word addresses (PC[31:2]). The branch target is the
// incremented PC plus imm16 sign-extended to 30 bits; the jump target is
// the upper 4 bits of the incremented PC followed by imm26. j selects the
// jump target, otherwise the branch target leaves on target. pc_src, the
// select of the PC multiplexer, is
//     pc_src = j | (beq & zero) | (bne & ~zero)
// where zero is the ALU's zero flag after the ALU subtracted Rt from Rs.
// Combinational. This follows the next-PC circuit of the reference design, including
// the adder and the target multiplexer.
module next_pc (
  input  logic [29:0] inc_pc,
  input  logic [15:0] imm16,
  input  logic [25:0] imm26,
  input  logic        zero,
  input  logic        beq,
  input  logic        bne,
  input  logic        j,
  output logic [29:0] target,
  output logic        pc_src
);
  logic [29:0] imm_se;
  logic [29:0] branch_target;
  logic        unused_cout;

  assign imm_se = {{14{imm16[15]}}, imm16};

  adder #(.WIDTH(30)) u_add (
    .a   (inc_pc),
    .b   (imm_se),
    .sum (branch_target),
    .cout(unused_cout)
  );

  mux2 #(.WIDTH(30)) u_mux (
    .d0 (branch_target),
    .d1 ({inc_pc[29:26], imm26}),
    .sel(j),
    .y  (target)
  );

  assign pc_src = j | (beq & zero) | (bne & ~zero);
endmodule
