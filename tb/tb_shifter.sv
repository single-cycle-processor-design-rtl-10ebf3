// tb_shifter: self-checking testbench for shifter.
// Checks all four operations for every shift amount on random data, against
// a bit-by-bit reference.
module tb_shifter;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] data, res, expv;
  logic [4:0]  sa;
  shift_op_e   op;

  shifter dut (.data(data), .shamt(sa), .op(op), .result(res));

  function automatic logic [31:0] ref_shift(logic [31:0] x, int n, shift_op_e o);
    logic [31:0] r;
    for (int k = 0; k < 32; k++) begin
      case (o)
        SH_NONE: r[k] = x[k];
        SH_SLL:  r[k] = (k - n >= 0) ? x[k-n] : 1'b0;
        SH_SRL:  r[k] = (k + n < 32) ? x[k+n] : 1'b0;
        default: r[k] = (k + n < 32) ? x[k+n] : x[31];
      endcase
    end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int n = 0; n < 32; n++) begin
        for (int o = 0; o < 4; o++) begin
          data = (t == 0) ? 32'h8000_0001 : $urandom;
          sa = 5'(n); op = shift_op_e'(o);
          #1;
          expv = ref_shift(data, n, op);
          checks++;
          if (res !== expv) begin
            failures++;
            $display("FAIL op=%s data=%h sa=%0d res=%h exp=%h", op.name(), data, sa, res, expv);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
