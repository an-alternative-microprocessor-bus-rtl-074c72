// bus_pkg: types and constants shared by the multiplexed-bus microprocessor.
//
// The machine has four general registers R0..R3 joined by a bus that is built
// from multiplexers instead of tri-state drivers. This package fixes the
// register count, the default data width, the ALU opcode encoding and the
// command format understood by the control unit.
//
// The register count, the 8-bit width and the opcode encoding (00 ADD, 01 SUB,
// 10 shift left, 11 AND) follow the document. The command format
// (bus_cmd_t) belongs to this design's own control unit.
package bus_pkg;

  // Number of registers on the bus; the 4-to-1 source multiplexer and the
  // 4-bit write vector depend on it, so it is fixed rather than a parameter.
  localparam int unsigned NUM_REGS = 4;

  // Default data width of registers, bus and ALU.
  localparam int unsigned DATA_WIDTH = 8;

  // Register index, as carried by move and by commands.
  typedef logic [1:0] reg_idx_t;

  // ALU opcode.
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,  // out = A + B, cout = carry
    ALU_SUB = 2'b01,  // out = A - B, cout = borrow
    ALU_SHL = 2'b10,  // out = A << 1
    ALU_AND = 2'b11   // out = A & B
  } alu_op_t;

  // Operand pair select for the ALU. A = select[1] ? R2 : R3,
  // B = select[0] ? R0 : R1.
  typedef enum logic [1:0] {
    SEL_R3_R1 = 2'b00,
    SEL_R3_R0 = 2'b01,
    SEL_R2_R1 = 2'b10,
    SEL_R2_R0 = 2'b11
  } alu_sel_t;

  // Kind of bus transfer.
  typedef enum logic {
    CMD_LOAD = 1'b0,  // external data -> R[dst]
    CMD_MOVE = 1'b1   // R[src]        -> R[dst]
  } cmd_kind_t;

  // One bus command for the control unit.
  typedef struct packed {
    cmd_kind_t kind;
    reg_idx_t  src;  // ignored by CMD_LOAD
    reg_idx_t  dst;
  } bus_cmd_t;

endpackage
