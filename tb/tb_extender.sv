// tb_extender: self-checking testbench for extender.
// Checks sign and zero extension of every 16-bit immediate.
module tb_extender;
  int checks = 0, failures = 0;
  logic [15:0] imm;
  logic        ext_op;
  logic [31:0] y, expv;

  extender dut (.imm16(imm), .ext_op(ext_op), .ext32(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      for (int e = 0; e < 2; e++) begin
        imm = 16'(i); ext_op = 1'(e);
        #1;
        expv = e ? 32'(signed'(16'(i))) : {16'h0, 16'(i)};
        checks++;
        if (y !== expv) begin
          failures++;
          if (failures < 10) $display("FAIL imm=%h ext_op=%0d y=%h exp=%h", imm, ext_op, y, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
