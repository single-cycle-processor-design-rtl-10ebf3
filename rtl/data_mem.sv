// data_mem: data memory for loads and stores.
//
// WORDS 32-bit words, word-addressed by addr[AW+1:2] (the low two bits of
// the byte address are ignored, as are bits above the memory size).
// Read: while mem_read is 1 the addressed word appears on data_out
// combinationally; while it is 0 data_out is 0. Write: on a rising clock
// edge with mem_write = 1, data_in is stored at the addressed word.
//
// MemRead as an output enable and the clocked MemWrite follow the reference design.
// The size, driving 0 when not reading, and the optional INIT_FILE
// ($readmemh) are this design's choices.
module data_mem #(
  parameter int unsigned WORDS     = 1024,
  parameter string       INIT_FILE = ""
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] data_in,
  input  logic        mem_read,
  input  logic        mem_write,
  output logic [31:0] data_out
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (mem_write) mem[addr[AW+1:2]] <= data_in;
  end

  assign data_out = mem_read ? mem[addr[AW+1:2]] : '0;
endmodule
