// mux_bus_datapath: the register file, multiplexed bus and ALU.
//
// Four registers R0..R3 share one bus. The bus is not a wire driven by
// tri-state buffers but the output of two multiplexers in series:
//   * a 4-to-1 multiplexer picks R[move];
//   * a 2-to-1 multiplexer replaces that with the external data when
//     enable is 1.
// The bus goes to the x input of every register, and write[i] loads Ri from
// it at the next rising clock edge. A register-to-register transfer is thus
// one cycle with move = source, write = one-hot destination and enable = 0;
// loading external data is one cycle with enable = 1. Since a multiplexer
// always has exactly one source, the bus can never be fought over or float.
//
// Independently of the bus, two 2-to-1 multiplexers pick the ALU operands:
//   A = select[1] ? R2 : R3      B = select[0] ? R0 : R1
// giving select 00 = (R3,R1), 01 = (R3,R0), 10 = (R2,R1), 11 = (R2,R0), and
// the combinational ALU turns them into out and cout under op.
//
// Ports follow the document's top-level entity (clock, data, enable, move,
// write, select, op in; R0..R3, out, cout out), with R0..R3 packed into r.
// The move encoding and the enable polarity come from the document's
// waveforms. The operand pairs follow its two-multiplexer structure and
// waveforms; its table names (R3,R2) for select 00, which this design does
// not follow. The reset rst_n and the bus output are this design's own.
module mux_bus_datapath #(
  parameter int unsigned WIDTH = bus_pkg::DATA_WIDTH
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic [WIDTH-1:0]                        data,
  input  logic                                    enable,
  input  bus_pkg::reg_idx_t                       move,
  input  logic [bus_pkg::NUM_REGS-1:0]            write,
  input  bus_pkg::alu_sel_t                       select,
  input  bus_pkg::alu_op_t                        op,
  output logic [bus_pkg::NUM_REGS-1:0][WIDTH-1:0] r,
  output logic [WIDTH-1:0]                        bus,
  output logic [WIDTH-1:0]                        out,
  output logic                                    cout
);
  import bus_pkg::*;

  logic [WIDTH-1:0] reg_side;   // output of the 4-to-1 register multiplexer
  logic [WIDTH-1:0] opnd_a;
  logic [WIDTH-1:0] opnd_b;

  // ---------------------------------------------------------------- registers
  for (genvar i = 0; i < NUM_REGS; i++) begin : g_reg
    bus_register #(.WIDTH(WIDTH)) u_reg (
      .clk  (clk),
      .rst_n(rst_n),
      .ena  (write[i]),
      .x    (bus),
      .q    (r[i])
    );
  end

  // ---------------------------------------------------------------- the bus
  mux4to1 #(.WIDTH(WIDTH)) u_bus_src (
    .d0 (r[0]),
    .d1 (r[1]),
    .d2 (r[2]),
    .d3 (r[3]),
    .sel(move),
    .y  (reg_side)
  );

  mux2to1 #(.WIDTH(WIDTH)) u_bus_in (
    .d0 (reg_side),
    .d1 (data),
    .sel(enable),
    .y  (bus)
  );

  // ---------------------------------------------------------------- ALU side
  mux2to1 #(.WIDTH(WIDTH)) u_opnd_a (
    .d0 (r[3]),
    .d1 (r[2]),
    .sel(select[1]),
    .y  (opnd_a)
  );

  mux2to1 #(.WIDTH(WIDTH)) u_opnd_b (
    .d0 (r[1]),
    .d1 (r[0]),
    .sel(select[0]),
    .y  (opnd_b)
  );

  alu #(.WIDTH(WIDTH)) u_alu (
    .a   (opnd_a),
    .b   (opnd_b),
    .op  (op),
    .out (out),
    .cout(cout)
  );

endmodule
