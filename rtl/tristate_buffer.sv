// tristate_buffer: WIDTH-bit tri-state buffer.
//
// While enable is 1, data_out is driven with data_in; while enable is 0,
// data_out is released (high impedance) so that another buffer may drive
// the same bus. Several buffers with one-hot enables on one net form a
// multiplexer, which is how the reference register file builds its read
// ports. Combinational. Follows the tri-state buffer of the reference design.
module tristate_buffer #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] data_in,
  input  logic             enable,
  output tri   [WIDTH-1:0] data_out
);
  assign data_out = enable ? data_in : 'z;
endmodule
