// register_en: n-bit edge-triggered register with write enable.
//
// On each rising clock edge, if we is 1, q takes the value of d; if we is 0,
// q holds. rst is a synchronous, active-high reset that loads RESET_VAL and
// takes priority over we. In the processor this is the program counter,
// 30 bits wide (the word address, PC[31:2]) and written every cycle.
// The write-enable behaviour follows the register element of the reference design;
// the reset and its value are this design's addition, since a processor
// needs a defined start address.
module register_en #(
  parameter int unsigned     WIDTH     = 32,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VAL;
    else if (we) q <= d;
  end
endmodule
