// tb_alu: self-checking testbench for alu.
// Runs every ALU operation (the six ALUCtrl codes through
// mips_pkg::alu_fields, plus NOR and the three shifts through the select
// fields directly) on corner and random operands, and checks result, zero
// and overflow against reference arithmetic on wider integers.
module tb_alu;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, res;
  logic        zero, ovf;
  alu_fields_t f;

  alu dut (.a(a), .b(b), .ctrl(f), .result(res), .zero(zero), .overflow(ovf));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // op index: 0 ADD 1 SUB 2 AND 3 OR 4 XOR 5 SLT 6 NOR 7 SLL 8 SRL 9 SRA
  task automatic run(input int opi, input logic [31:0] x, input logic [31:0] y);
    longint sx, sy, s;
    logic [31:0] expv;
    logic        exp_ovf_valid, exp_ovf;
    sx = longint'(signed'(x)); sy = longint'(signed'(y));
    exp_ovf_valid = 0; exp_ovf = 0;
    case (opi)
      0: f = alu_fields(ALU_ADD);
      1: f = alu_fields(ALU_SUB);
      2: f = alu_fields(ALU_AND);
      3: f = alu_fields(ALU_OR);
      4: f = alu_fields(ALU_XOR);
      5: f = alu_fields(ALU_SLT);
      6: f = '{shift_op: SH_NONE, sub: 1'b0, logic_op: LG_NOR, sel: SEL_LOGIC};
      7: f = '{shift_op: SH_SLL,  sub: 1'b0, logic_op: LG_AND, sel: SEL_SHIFT};
      8: f = '{shift_op: SH_SRL,  sub: 1'b0, logic_op: LG_AND, sel: SEL_SHIFT};
      default: f = '{shift_op: SH_SRA, sub: 1'b0, logic_op: LG_AND, sel: SEL_SHIFT};
    endcase
    case (opi)
      0: begin s = sx + sy; expv = s[31:0]; exp_ovf_valid = 1; exp_ovf = (s > 64'sd2147483647) || (s < -64'sd2147483648); end
      1: begin s = sx - sy; expv = s[31:0]; exp_ovf_valid = 1; exp_ovf = (s > 64'sd2147483647) || (s < -64'sd2147483648); end
      2: expv = x & y;
      3: expv = x | y;
      4: expv = x ^ y;
      5: expv = (sx < sy) ? 32'd1 : 32'd0;
      6: expv = ~(x | y);
      7: expv = y << x[4:0];
      8: expv = y >> x[4:0];
      default: expv = 32'(sy >>> x[4:0]);
    endcase
    a = x; b = y;
    #1;
    checks++;
    if (res !== expv || zero !== (expv == 0) || (exp_ovf_valid && ovf !== exp_ovf)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h res=%h exp=%h zero=%b ovf=%b", opi, x, y, res, expv, zero, ovf);
    end
  endtask

  logic [31:0] corners [6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h1234_5678};

  initial begin
    for (int o = 0; o < 10; o++) begin
      foreach (corners[i]) foreach (corners[j]) run(o, corners[i], corners[j]);
      for (int k = 0; k < 300; k++) run(o, $urandom, $urandom);
      run(o, 32'h55, 32'h55);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
