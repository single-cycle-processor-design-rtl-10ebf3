// tb_tristate_buffer: self-checking testbench for tristate_buffer.
// Four buffers share one bus with one-hot enables, forming a 4-to-1
// multiplexer as the reference register file does; the bus must carry the
// enabled buffer's input. A fifth buffer drives a pulled-down net alone to
// show that a disabled buffer releases its output.
module tb_tristate_buffer;
  int checks = 0, failures = 0;
  logic [31:0] din [4];
  logic [3:0]  en;
  tri   [31:0] bus;
  logic [31:0] solo_in;
  logic        solo_en;
  tri0  [31:0] solo_bus;

  for (genvar g = 0; g < 4; g++) begin : g_buf
    tristate_buffer #(.WIDTH(32)) u_buf (.data_in(din[g]), .enable(en[g]), .data_out(bus));
  end

  tristate_buffer #(.WIDTH(32)) u_solo (.data_in(solo_in), .enable(solo_en), .data_out(solo_bus));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      int s;
      s = i % 4;
      foreach (din[k]) din[k] = $urandom;
      en = 4'b0001 << s;
      solo_in = $urandom | 32'h1;
      solo_en = 1'(i & 1);
      #1;
      checks++;
      if (bus !== din[s]) begin
        failures++;
        $display("FAIL sel=%0d bus=%h exp=%h", s, bus, din[s]);
      end
      checks++;
      if (solo_bus !== (solo_en ? solo_in : 32'h0)) begin
        failures++;
        $display("FAIL solo en=%0d bus=%h", solo_en, solo_bus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
