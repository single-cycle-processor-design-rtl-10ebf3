// adder: parameterised WIDTH-bit binary adder.
//
// sum = a + b, modulo 2**WIDTH, with the carry out of the top bit on cout.
// Combinational. In the processor one instance is the PC incrementer, which
// adds 1 to the upper 30 bits of the PC (the low two bits of a word address
// are always 00), and one sits in the next-PC block to add the
// sign-extended branch offset to the incremented PC. How the sum is formed
// is left to synthesis.
module adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  assign {cout, sum} = {1'b0, a} + {1'b0, b};
endmodule
