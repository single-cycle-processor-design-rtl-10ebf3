// tb_alu_control: self-checking testbench for alu_control.
// Checks the ALU control truth table: the six R-type funct codes give
// ADD 0000, SUB 0010, AND 0100, OR 0101, XOR 0110, SLT 1010, and each
// non-R-type ALUOp gives its operation whatever the funct field holds.
module tb_alu_control;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e    aop;
  logic [5:0] funct;
  alu_ctrl_e  actl;

  alu_control dut (.alu_op(aop), .funct(funct), .alu_ctrl(actl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input alu_op_e o, input logic [5:0] fn, input logic [3:0] expv);
    aop = o; funct = fn;
    #1;
    checks++;
    if (4'(actl) !== expv) begin
      failures++;
      $display("FAIL aluop=%0d funct=%h alu_ctrl=%b exp=%b", o, fn, actl, expv);
    end
  endtask

  initial begin
    check(ALUOP_RTYPE, 6'h20, 4'b0000);
    check(ALUOP_RTYPE, 6'h22, 4'b0010);
    check(ALUOP_RTYPE, 6'h24, 4'b0100);
    check(ALUOP_RTYPE, 6'h25, 4'b0101);
    check(ALUOP_RTYPE, 6'h26, 4'b0110);
    check(ALUOP_RTYPE, 6'h2a, 4'b1010);
    for (int i = 0; i < 50; i++) begin
      logic [5:0] r;
      r = 6'($urandom);
      check(ALUOP_ADD, r, 4'b0000);
      check(ALUOP_SUB, r, 4'b0010);
      check(ALUOP_AND, r, 4'b0100);
      check(ALUOP_OR,  r, 4'b0101);
      check(ALUOP_XOR, r, 4'b0110);
      check(ALUOP_SLT, r, 4'b1010);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
