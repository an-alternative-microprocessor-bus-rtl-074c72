// mux2to1: two-input multiplexer of WIDTH bits.
//
// y follows d0 when sel is 0 and d1 when sel is 1; purely combinational.
// The datapath uses three of them: one chooses between the register
// multiplexer and external data as the bus source, and two choose the ALU
// operands. The block itself is as the document describes it; which signal
// sits on which input is decided where it is instantiated.
module mux2to1 #(
  parameter int unsigned WIDTH = bus_pkg::DATA_WIDTH
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  assign y = sel ? d1 : d0;

endmodule
