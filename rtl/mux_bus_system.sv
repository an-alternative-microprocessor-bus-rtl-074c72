// mux_bus_system: the multiplexed-bus microprocessor, control unit plus datapath.
//
// A small 8-bit machine with four registers R0..R3 whose bus is made of
// multiplexers rather than tri-state drivers. Bus commands enter through
// cmd_valid/cmd and are turned by the control unit into the datapath's
// enable, move and write signals:
//   LOAD dst      copies the external data input into R[dst];
//   MOVE src,dst  copies R[src] into R[dst] over the bus.
// A command presented in cycle n changes its destination register at the
// rising edge that ends cycle n+1 (one cycle in the control unit, one on the
// bus). The ALU side is combinational and independent of the bus: select
// picks the operand pair (00 R3,R1; 01 R3,R0; 10 R2,R1; 11 R2,R0) and op the
// operation (00 ADD, 01 SUB, 10 shift left, 11 AND); out and cout follow in
// the same cycle. The current bus value is brought out on bus for observation.
//
// The split into a data path and a control unit, the datapath's structure
// and the ALU follow the document. The command interface of the control unit
// and the reset rst_n are this design's own.
module mux_bus_system #(
  parameter int unsigned WIDTH = bus_pkg::DATA_WIDTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  input  bus_pkg::bus_cmd_t cmd,
  input  logic [WIDTH-1:0]  data,
  input  bus_pkg::alu_sel_t select,
  input  bus_pkg::alu_op_t  op,
  output logic [WIDTH-1:0]  R0,
  output logic [WIDTH-1:0]  R1,
  output logic [WIDTH-1:0]  R2,
  output logic [WIDTH-1:0]  R3,
  output logic [WIDTH-1:0]  bus,
  output logic [WIDTH-1:0]  out,
  output logic              cout
);
  import bus_pkg::*;

  logic                           enable;
  reg_idx_t                       move;
  logic [NUM_REGS-1:0]            write;
  logic [NUM_REGS-1:0][WIDTH-1:0] r;

  bus_control_unit u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .cmd_valid(cmd_valid),
    .cmd      (cmd),
    .enable   (enable),
    .move     (move),
    .write    (write)
  );

  mux_bus_datapath #(.WIDTH(WIDTH)) u_dp (
    .clk   (clk),
    .rst_n (rst_n),
    .data  (data),
    .enable(enable),
    .move  (move),
    .write (write),
    .select(select),
    .op    (op),
    .r     (r),
    .bus   (bus),
    .out   (out),
    .cout  (cout)
  );

  assign R0 = r[0];
  assign R1 = r[1];
  assign R2 = r[2];
  assign R3 = r[3];

endmodule
