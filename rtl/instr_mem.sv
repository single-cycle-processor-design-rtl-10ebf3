// instr_mem: read-only instruction memory.
//
// WORDS 32-bit words. The byte address from the PC selects word
// addr[AW+1:2]; the instruction appears on instruction combinationally,
// after the access time, with no clock. Address bits above the memory size
// are ignored (the memory repeats through the address space). The
// datapath never writes it: its contents come from INIT_FILE (hex, one
// word per line, read with $readmemh) or are placed by a testbench.
//
// Combinational read-only behaviour follows the reference design. The size, the
// ignored upper address bits and the loading by file are this design's
// choices; the reference design gives no memory size.
module instr_mem #(
  parameter int unsigned WORDS     = 1024,
  parameter string       INIT_FILE = ""
) (
  input  logic [31:0] addr,
  output logic [31:0] instruction
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign instruction = mem[addr[AW+1:2]];
endmodule
