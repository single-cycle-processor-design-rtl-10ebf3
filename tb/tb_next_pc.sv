// tb_next_pc: self-checking testbench for next_pc.
// Drives random incremented PCs, immediates and control combinations and
// checks the target (branch: inc_pc + sign_ext(imm16); jump:
// {inc_pc[29:26], imm26}) and pc_src = J + Beq.Zero + Bne.!Zero.
module tb_next_pc;
  int checks = 0, failures = 0;
  logic [29:0] inc, target, exp_t;
  logic [15:0] imm16;
  logic [25:0] imm26;
  logic        zero, beq, bne, j, pc_src, exp_src;

  next_pc dut (
    .inc_pc(inc), .imm16(imm16), .imm26(imm26), .zero(zero),
    .beq(beq), .bne(bne), .j(j), .target(target), .pc_src(pc_src)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      inc = 30'($urandom);
      imm26 = 26'($urandom);
      imm16 = (i < 16) ? 16'(-i) : 16'($urandom);
      {zero, beq, bne, j} = 4'(i);
      #1;
      exp_t   = j ? {inc[29:26], imm26} : 30'(longint'(inc) + longint'(signed'(imm16)));
      exp_src = j || (beq && zero) || (bne && !zero);
      checks++;
      if (target !== exp_t || pc_src !== exp_src) begin
        failures++;
        $display("FAIL inc=%h imm16=%h imm26=%h zbnj=%b target=%h exp=%h src=%b exp=%b",
                 inc, imm16, imm26, {zero, beq, bne, j}, target, exp_t, pc_src, exp_src);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
