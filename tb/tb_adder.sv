// tb_adder: self-checking testbench for adder.
// Checks 32-bit and 30-bit instances on corner and random operands against
// a 64-bit reference sum, including the carry out.
module tb_adder;
  int checks = 0, failures = 0;
  logic [31:0] a, b, s;
  logic        c;
  logic [29:0] a30, b30, s30;
  logic        c30;
  longint unsigned ref_sum;

  adder #(.WIDTH(32)) dut   (.a(a), .b(b), .sum(s), .cout(c));
  adder #(.WIDTH(30)) dut30 (.a(a30), .b(b30), .sum(s30), .cout(c30));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] yv);
    a = x; b = yv; a30 = x[29:0]; b30 = yv[29:0];
    #1;
    ref_sum = longint'(x) + longint'(yv);
    checks++;
    if (s !== ref_sum[31:0] || c !== ref_sum[32]) begin
      failures++;
      $display("FAIL %h + %h = %h c=%b", x, yv, s, c);
    end
    ref_sum = longint'(x[29:0]) + longint'(yv[29:0]);
    checks++;
    if (s30 !== ref_sum[29:0] || c30 !== ref_sum[30]) begin
      failures++;
      $display("FAIL30 %h + %h = %h c=%b", x[29:0], yv[29:0], s30, c30);
    end
  endtask

  initial begin
    check(0, 0);
    check(32'hffff_ffff, 1);
    check(32'h3fff_ffff, 1);
    check(32'h7fff_ffff, 32'h7fff_ffff);
    for (int i = 0; i < 300; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
