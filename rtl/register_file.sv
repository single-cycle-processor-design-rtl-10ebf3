// register_file: 32 x 32-bit MIPS register file, two read ports, one write
// port.
//
// Reads are combinational: bus_a shows register ra and bus_b register rb
// after the access time, with no clock involved. The write is clocked: on a
// rising edge with reg_write = 1, bus_w is stored into register rw. The
// clock is used only for writing. Register 0 is not stored at all; both
// read ports return 0 for it and writes to it are dropped, so R0 is always
// zero. A register written in a cycle is read with its new value from the
// next cycle on (edge-triggered clocking).
//
// This follows the register file of the reference design, including the missing R0
// and the read ports built from tri-state buffers: each register drives
// BusA and BusB through its own buffer, enabled by a decoder of RA or RB,
// and a buffer fed with 0 stands in for R0. Since a read address always
// decodes to exactly one buffer, each bus always has exactly one driver.
// The write side uses an enabled register write instead of the reference design's
// gated clock (clock AND RegWrite AND decoded RW), which has the same
// effect. The registers have no reset, as in the reference design.
//
// Synthesis tools that do not map tri-state buses report BusA and BusB as
// nets with several drivers. That is the intended structure: exactly one
// buffer per bus is enabled at any time.
module register_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic [$clog2(NREGS)-1:0] ra,
  input  logic [$clog2(NREGS)-1:0] rb,
  input  logic [$clog2(NREGS)-1:0] rw,
  input  logic                     reg_write,
  input  logic [WIDTH-1:0]         bus_w,
  output logic [WIDTH-1:0]         bus_a,
  output logic [WIDTH-1:0]         bus_b
);
  logic [WIDTH-1:0] regs [1:NREGS-1];
  tri   [WIDTH-1:0] bus_a_t;
  tri   [WIDTH-1:0] bus_b_t;

  always_ff @(posedge clk) begin
    if (reg_write && rw != '0) regs[rw] <= bus_w;
  end

  // Read ports: one tri-state buffer per register and per bus, enabled by
  // the decoded read address. Slot 0 drives the constant 0.
  for (genvar r = 0; r < NREGS; r++) begin : g_read
    logic [WIDTH-1:0] value;
    if (r == 0) begin : g_zero
      assign value = '0;
    end else begin : g_reg
      assign value = regs[r];
    end
    tristate_buffer #(.WIDTH(WIDTH)) u_buf_a (
      .data_in(value), .enable(ra == r), .data_out(bus_a_t)
    );
    tristate_buffer #(.WIDTH(WIDTH)) u_buf_b (
      .data_in(value), .enable(rb == r), .data_out(bus_b_t)
    );
  end

  assign bus_a = bus_a_t;
  assign bus_b = bus_b_t;
endmodule
