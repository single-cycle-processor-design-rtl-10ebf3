// mux2: parameterised 2-to-1 multiplexer.
//
// Output y follows d0 while sel is 0 and d1 while sel is 1. Purely
// combinational. The datapath uses four of them: the RegDst mux (Rt or Rd
// as write register), the ALUSrc mux (BusB or extended immediate), the
// MemtoReg mux (ALU result or memory data onto BusW) and the PCSrc mux
// (incremented PC or branch/jump target). Input 0 / input 1 numbering
// follows the reference datapath; the width is a parameter.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  assign y = sel ? d1 : d0;
endmodule
