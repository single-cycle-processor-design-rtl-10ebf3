// tb_mux2: self-checking testbench for mux2.
// Drives random data on both inputs at two widths and checks that y equals
// d0 when sel is 0 and d1 when sel is 1.
module tb_mux2;
  int checks = 0, failures = 0;
  logic [31:0] d0, d1, y;
  logic [4:0]  e0, e1, ey;
  logic        sel;

  mux2 #(.WIDTH(32)) dut   (.d0(d0), .d1(d1), .sel(sel), .y(y));
  mux2 #(.WIDTH(5))  dut5  (.d0(e0), .d1(e1), .sel(sel), .y(ey));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d0 = $urandom; d1 = $urandom; e0 = 5'($urandom); e1 = 5'($urandom);
      sel = 1'(i & 1);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0) || ey !== (sel ? e1 : e0)) begin
        failures++;
        $display("FAIL sel=%0d d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
