// mux4to1: four-input multiplexer of WIDTH bits, the register side of the bus.
//
// y follows d[sel]: sel = 0 passes d0, 1 passes d1, 2 passes d2, 3 passes d3.
// Purely combinational. In the datapath the inputs are R0..R3 and sel is the
// move signal, so exactly one register drives the bus at any time, which is
// the point of replacing tri-state drivers by a multiplexer. The block follows
// the document; the index order is taken from its register-transfer
// waveforms.
module mux4to1 #(
  parameter int unsigned WIDTH = bus_pkg::DATA_WIDTH
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic [WIDTH-1:0] d2,
  input  logic [WIDTH-1:0] d3,
  input  logic [1:0]       sel,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (sel)
      2'd0: y = d0;
      2'd1: y = d1;
      2'd2: y = d2;
      2'd3: y = d3;
    endcase
  end

endmodule
