// tb_register_file: self-checking testbench for register_file.
// Writes every register, then runs random reads and writes against an
// array model: reads are combinational, a write lands at the clock edge
// only when reg_write is 1, and register 0 always reads 0.
module tb_register_file;
  int checks = 0, failures = 0;
  logic        clk = 0;
  logic [4:0]  ra, rb, rw;
  logic        we;
  logic [31:0] bw, ba, bb;
  logic [31:0] model [32];

  register_file dut (
    .clk(clk), .ra(ra), .rb(rb), .rw(rw), .reg_write(we),
    .bus_w(bw), .bus_a(ba), .bus_b(bb)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads;
    for (int r = 0; r < 32; r += 2) begin
      ra = 5'(r); rb = 5'(r + 1);
      #1;
      checks++;
      if (ba !== model[r] || bb !== model[r+1]) begin
        failures++;
        $display("FAIL read r%0d=%h (exp %h) r%0d=%h (exp %h)", r, ba, model[r], r+1, bb, model[r+1]);
      end
    end
  endtask

  initial begin
    we = 0; rw = 0; bw = 0; ra = 0; rb = 0;
    model[0] = '0;
    // Fill every register, including an attempt on R0.
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1; rw = 5'(r); bw = $urandom;
      @(posedge clk);
      if (r != 0) model[r] = bw;
    end
    @(negedge clk);
    we = 0;
    check_reads();
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = 1'($urandom); rw = 5'($urandom); bw = $urandom;
      ra = rw; rb = 5'($urandom);
      #1;
      // Before the edge the old value is still read.
      checks++;
      if (ba !== model[ra] || bb !== model[rb]) begin
        failures++;
        $display("FAIL pre-edge ra=%0d %h exp %h", ra, ba, model[ra]);
      end
      @(posedge clk);
      if (we && rw != 0) model[rw] = bw;
      #1;
      checks++;
      if (ba !== model[ra] || bb !== model[rb]) begin
        failures++;
        $display("FAIL post-edge ra=%0d %h exp %h rb=%0d %h exp %h", ra, ba, model[ra], rb, bb, model[rb]);
      end
    end
    @(negedge clk);
    we = 0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
