// tb_register_en: self-checking testbench for register_en.
// Checks reset to RESET_VAL, loading when we = 1, holding when we = 0, and
// that q changes only at the rising clock edge.
module tb_register_en;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, we;
  logic [29:0] d, q;
  logic [29:0] model;

  register_en #(.WIDTH(30), .RESET_VAL(30'h1234)) dut (
    .clk(clk), .rst(rst), .we(we), .d(d), .q(q)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; d = '0;
    @(posedge clk); #1;
    checks++;
    if (q !== 30'h1234) begin failures++; $display("FAIL reset q=%h", q); end
    model = 30'h1234;
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      we = 1'($urandom);
      d  = 30'($urandom);
      #2;  // mid-cycle: q must not follow d before the edge
      checks++;
      if (q !== model) begin failures++; $display("FAIL early change q=%h", q); end
      @(posedge clk);
      if (we) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL we=%0d d=%h q=%h exp=%h", we, d, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
