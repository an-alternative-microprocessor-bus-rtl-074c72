// bus_register: one of the four general registers hanging on the bus.
//
// The register samples its input x at the rising edge of clk when ena is 1
// and keeps its contents otherwise, so a value written in one cycle appears
// on q right after the next rising edge. The ports clk, ena, x and q and the
// load-on-enable behaviour follow the document. The active-low asynchronous
// reset rst_n, which clears q to zero, is this design's own addition so that
// the register never holds an undefined value.
module bus_register #(
  parameter int unsigned WIDTH = bus_pkg::DATA_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ena,
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (ena) q <= x;
  end

endmodule
