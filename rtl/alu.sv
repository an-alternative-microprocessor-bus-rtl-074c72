// alu: combinational arithmetic-logic unit of the bus microprocessor.
//
// Four operations, chosen by op (bus_pkg::alu_op_t):
//   ADD  out = a + b,  cout = carry out of the top bit
//   SUB  out = a - b,  cout = borrow (1 when a < b, unsigned)
//   SHL  out = a << 1, a zero shifted in, cout = 0
//   AND  out = a & b,  cout = 0
// Results appear in the same cycle; nothing is stored.
//
// The operation set and its encoding follow the document, as does the carry
// of ADD. The borrow on SUB is read from the document's waveforms. The
// document's own ALU keeps the previous cout during SHL and AND (a latch);
// here cout is 0 for those two operations so the block stays latch-free.
module alu #(
  parameter int unsigned WIDTH = bus_pkg::DATA_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  bus_pkg::alu_op_t op,
  output logic [WIDTH-1:0] out,
  output logic             cout
);
  import bus_pkg::*;

  always_comb begin
    unique case (op)
      ALU_ADD: {cout, out} = {1'b0, a} + {1'b0, b};
      ALU_SUB: {cout, out} = {1'b0, a} - {1'b0, b};
      ALU_SHL: {cout, out} = {1'b0, a[WIDTH-2:0], 1'b0};
      ALU_AND: {cout, out} = {1'b0, a & b};
    endcase
  end

endmodule
