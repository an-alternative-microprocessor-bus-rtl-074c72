// bus_control_unit: sequences bus transfers for the datapath.
//
// It accepts one command per cycle (cmd_valid, cmd) and turns it into the
// datapath's bus controls for exactly one cycle:
//   CMD_LOAD dst      -> enable = 1,            write = one-hot(dst)
//   CMD_MOVE src,dst  -> enable = 0, move = src, write = one-hot(dst)
// With no command all controls are idle (enable = 0, move = 0, write = 0).
// The controls are registered: a command sampled at rising edge n drives the
// bus during the cycle that follows, and the destination register takes its
// new value at edge n+1. Because move is an index and write is built from a single
// destination index, only one source ever drives the bus and at most one
// register is written per cycle.
//
// The document gives this unit's duties (loading registers, moving data
// between registers, one bus source at a time, clocked by the register
// clock) but neither its inputs nor its insides; the command format, the
// one-cycle latency and the idle values are this design's own.
module bus_control_unit (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           cmd_valid,
  input  bus_pkg::bus_cmd_t              cmd,
  output logic                           enable,
  output bus_pkg::reg_idx_t              move,
  output logic [bus_pkg::NUM_REGS-1:0]   write
);
  import bus_pkg::*;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable <= 1'b0;
      move   <= '0;
      write  <= '0;
    end else if (cmd_valid) begin
      enable <= (cmd.kind == CMD_LOAD);
      move   <= (cmd.kind == CMD_MOVE) ? cmd.src : reg_idx_t'(0);
      write  <= NUM_REGS'(1) << cmd.dst;
    end else begin
      enable <= 1'b0;
      move   <= '0;
      write  <= '0;
    end
  end

  // At most one register is written per cycle.
  a_write_onehot : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(write));

endmodule
