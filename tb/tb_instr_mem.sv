// tb_instr_mem: self-checking testbench for instr_mem.
// One instance is filled word by word from the testbench and read back at
// every byte address (the two low bits must be ignored) and through an
// aliased upper address; a second instance is loaded from imem_test.hex
// and checked against the words that file holds.
module tb_instr_mem;
  int checks = 0, failures = 0;
  localparam int unsigned WORDS = 64;
  logic [31:0] addr, instr, addr2, instr2;
  logic [31:0] image [WORDS];
  logic [31:0] file_words [8] = '{32'h20080005, 32'h2009000a, 32'h01095020, 32'hac0a0004,
                                  32'h8c0b0004, 32'h1000ffff, 32'h08000000, 32'h3c3c3c3c};

  instr_mem #(.WORDS(WORDS)) dut (.addr(addr), .instruction(instr));
  instr_mem #(.WORDS(16), .INIT_FILE("tb/imem_test.hex")) dut_file (.addr(addr2), .instruction(instr2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      image[i] = $urandom;
      dut.mem[i] = image[i];
    end
    for (int i = 0; i < WORDS * 4; i++) begin
      addr = 32'(i) | ((i % 3 == 0) ? 32'h0001_0000 : 32'h0);
      #1;
      checks++;
      if (instr !== image[i/4]) begin
        failures++;
        $display("FAIL addr=%h instr=%h exp=%h", addr, instr, image[i/4]);
      end
    end
    for (int i = 0; i < 8; i++) begin
      addr2 = 32'(4 * i);
      #1;
      checks++;
      if (instr2 !== file_words[i]) begin
        failures++;
        $display("FAIL file word %0d = %h exp %h", i, instr2, file_words[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
