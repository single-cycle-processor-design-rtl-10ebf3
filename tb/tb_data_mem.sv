// tb_data_mem: self-checking testbench for data_mem.
// Random loads and stores against an array model: a store lands at the
// clock edge only with mem_write = 1, a load shows the word combinationally
// only with mem_read = 1 (0 otherwise), and the low two address bits are
// ignored.
module tb_data_mem;
  int checks = 0, failures = 0;
  localparam int unsigned WORDS = 64;
  logic        clk = 0, rd, wr;
  logic [31:0] addr, din, dout, expv;
  logic [31:0] model [WORDS];

  data_mem #(.WORDS(WORDS)) dut (
    .clk(clk), .addr(addr), .data_in(din), .mem_read(rd), .mem_write(wr), .data_out(dout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd = 0; wr = 0; addr = 0; din = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      wr = 1; addr = 32'(4 * i); din = $urandom;
      @(posedge clk);
      model[i] = din;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr = 1'($urandom); rd = 1'($urandom);
      addr = {24'h0, 6'($urandom), 2'($urandom)};
      din = $urandom;
      #1;
      expv = rd ? model[addr[7:2]] : 32'h0;
      checks++;
      if (dout !== expv) begin
        failures++;
        $display("FAIL read rd=%0d addr=%h dout=%h exp=%h", rd, addr, dout, expv);
      end
      @(posedge clk);
      if (wr) model[addr[7:2]] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
