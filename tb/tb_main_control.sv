// tb_main_control: self-checking testbench for main_control.
// Checks every opcode of the subset against the main control signal table
// (don't-care entries are skipped), and checks that the other 53 opcodes
// write no register, write no memory and do not branch or jump.
module tb_main_control;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] op;
  ctrl_t      c;

  main_control dut (.op(op), .ctrl(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected row; -1 marks a don't-care.
  typedef struct {
    logic [5:0] op;
    int regdst, regwrite, extop, alusrc;
    alu_op_e aluop; int aluop_care;
    int beq, bne, j, memread, memwrite, memtoreg;
  } row_t;

  row_t rows [11] = '{
    '{OP_RTYPE, 1, 1, -1, 0, ALUOP_RTYPE, 1, 0, 0, 0, 0, 0, 0},
    '{OP_ADDI,  0, 1,  1, 1, ALUOP_ADD,   1, 0, 0, 0, 0, 0, 0},
    '{OP_SLTI,  0, 1,  1, 1, ALUOP_SLT,   1, 0, 0, 0, 0, 0, 0},
    '{OP_ANDI,  0, 1,  0, 1, ALUOP_AND,   1, 0, 0, 0, 0, 0, 0},
    '{OP_ORI,   0, 1,  0, 1, ALUOP_OR,    1, 0, 0, 0, 0, 0, 0},
    '{OP_XORI,  0, 1,  0, 1, ALUOP_XOR,   1, 0, 0, 0, 0, 0, 0},
    '{OP_LW,    0, 1,  1, 1, ALUOP_ADD,   1, 0, 0, 0, 1, 0, 1},
    '{OP_SW,   -1, 0,  1, 1, ALUOP_ADD,   1, 0, 0, 0, 0, 1, -1},
    '{OP_BEQ,  -1, 0, -1, 0, ALUOP_SUB,   1, 1, 0, 0, 0, 0, -1},
    '{OP_BNE,  -1, 0, -1, 0, ALUOP_SUB,   1, 0, 1, 0, 0, 0, -1},
    '{OP_J,    -1, 0, -1, -1, ALUOP_ADD,  0, 0, 0, 1, 0, 0, -1}
  };

  function automatic bit mism(int expv, logic got);
    return (expv >= 0) && (got !== 1'(expv));
  endfunction

  initial begin
    bit known;
    foreach (rows[i]) begin
      op = rows[i].op;
      #1;
      checks++;
      if (mism(rows[i].regdst, c.reg_dst) || mism(rows[i].regwrite, c.reg_write) ||
          mism(rows[i].extop, c.ext_op) || mism(rows[i].alusrc, c.alu_src) ||
          (rows[i].aluop_care != 0 && c.alu_op !== rows[i].aluop) ||
          mism(rows[i].beq, c.beq) || mism(rows[i].bne, c.bne) || mism(rows[i].j, c.j) ||
          mism(rows[i].memread, c.mem_read) || mism(rows[i].memwrite, c.mem_write) ||
          mism(rows[i].memtoreg, c.mem_to_reg)) begin
        failures++;
        $display("FAIL op=%h ctrl=%p", op, c);
      end
    end
    for (int o = 0; o < 64; o++) begin
      known = 0;
      foreach (rows[i]) if (rows[i].op == 6'(o)) known = 1;
      if (!known) begin
        op = 6'(o);
        #1;
        checks++;
        if (c.reg_write || c.mem_write || c.beq || c.bne || c.j) begin
          failures++;
          $display("FAIL undefined op=%h ctrl=%p", op, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
