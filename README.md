# An 8-bit microprocessor datapath with a multiplexer bus

A small datapath lets several registers share one bus. The classic way to build it is with
tri-state drivers: each register has a buffer onto a common wire, and only one buffer may be
enabled at a time. FPGAs have few tri-state drivers inside the fabric. Tri-state buses also
make timing, power and testing harder: an enable fault leaves the bus floating or driven by
two sources. This design builds the same bus from multiplexers. A 4-to-1 multiplexer picks
the register that drives the bus, and a 2-to-1 multiplexer replaces it with external data
when asked. The bus always has exactly one source, so it can neither float nor be fought
over. Bus contention is impossible by construction, not merely forbidden by the controller.

The machine has four 8-bit registers R0..R3, the bus, a two-operand ALU (add, subtract,
shift left, AND) and a control unit. The control unit turns "load" and "move" commands into
bus control signals.

## Structure

```
                 data ──────────────┐
                                    ▼
  R0 ─┐                         ┌────────┐
  R1 ─┤   ┌─────────┐ reg_side  │ 2-to-1 │ bus
  R2 ─┼──►│ 4-to-1  ├──────────►│        ├──────► x input of R0, R1, R2, R3
  R3 ─┘   └────▲────┘           └───▲────┘        (loaded when write[i] = 1)
               move                 enable

  R3 ─┐ ┌────────┐ A                 ┌─────┐
  R2 ─┴►│ 2-to-1 ├──────────────────►│     ├──► out[7:0]
        └───▲────┘                   │     │
         select[1]                   │ ALU ├──► cout
  R1 ─┐ ┌────────┐ B                 │     │
  R0 ─┴►│ 2-to-1 ├──────────────────►│     │◄── op[1:0]
        └───▲────┘                   └─────┘
         select[0]
```

| Module | File | Role |
|---|---|---|
| `mux_bus_system` | `rtl/mux_bus_system.sv` | top: control unit plus datapath |
| `bus_control_unit` | `rtl/bus_control_unit.sv` | commands → `enable`, `move`, `write` |
| `mux_bus_datapath` | `rtl/mux_bus_datapath.sv` | registers, bus multiplexers, operand multiplexers, ALU |
| `bus_register` | `rtl/bus_register.sv` | 8-bit register with load enable |
| `mux4to1` | `rtl/mux4to1.sv` | register side of the bus |
| `mux2to1` | `rtl/mux2to1.sv` | bus data input; ALU operand selection |
| `alu` | `rtl/alu.sv` | ADD, SUB, SHL, AND |
| `bus_pkg` | `rtl/bus_pkg.sv` | widths, opcode and select enums, command struct |

The only parameter is `WIDTH` (default 8), the width of the registers, bus and ALU. The
register count is fixed at four: the 4-to-1 multiplexer, the 2-bit `move` and the 4-bit
`write` all depend on it.

## The bus: one transfer per cycle

`mux_bus_datapath` exposes the raw bus controls:

| Signal | Width | Meaning |
|---|---|---|
| `enable` | 1 | 1: external `data` drives the bus. 0: the register picked by `move` drives it |
| `move` | 2 | index of the source register: `move = i` puts Ri on the bus |
| `write` | 4 | `write[i] = 1` loads Ri from the bus at the next rising edge |

A transfer takes one clock cycle and is purely a matter of these three signals:

- **load Rd from data:** `enable = 1`, `write = 1 << d`.
- **move Rs to Rd:** `enable = 0`, `move = s`, `write = 1 << d`.

The bus is combinational, so the value is on the bus in the same cycle. The destination
register holds it right after the rising edge that ends the cycle. Setting several `write` bits
copies the same value into several registers. Setting a bit for the source register itself
is harmless: it reloads its own value.

## The ALU and the operand pairs

The ALU reads two operands that are chosen independently of the bus. Bit 1 of `select`
picks A between R3 and R2. Bit 0 picks B between R1 and R0:

| `select` | A | B |
|---|---|---|
| 00 | R3 | R1 |
| 01 | R3 | R0 |
| 10 | R2 | R1 |
| 11 | R2 | R0 |

| `op` | Operation | `out` | `cout` |
|---|---|---|---|
| 00 | ADD | A + B | carry out of bit 7 |
| 01 | SUB | A − B (two's complement) | borrow: 1 when A < B unsigned |
| 10 | SHL | A << 1, 0 shifted in | 0 |
| 11 | AND | A & B | 0 |

The ALU is combinational: `out` and `cout` follow `select`, `op` and the register contents in
the same cycle, and nothing is stored.

Example: with R1 = 77 (01001101) and R2 = 55 (00110111), `select = 10` and `op = ADD` give
`out = 10000100` (132) with `cout = 0`. `op = SUB` gives 55 − 77 = `11101010` with
`cout = 1`.

## The control unit and command timing

`mux_bus_system` puts `bus_control_unit` in front of the datapath. Its command port is
`cmd_valid` plus a `bus_pkg::bus_cmd_t` struct:

| Field | Meaning |
|---|---|
| `kind` | `CMD_LOAD` (data → R[dst]) or `CMD_MOVE` (R[src] → R[dst]) |
| `src` | source register, used only by `CMD_MOVE` |
| `dst` | destination register |

The control unit registers its outputs. A command sampled at rising edge *n* drives `enable`,
`move` and `write` during the next cycle, and the destination changes at edge *n + 1*. Commands
can be issued back to back, one per cycle. A cycle without `cmd_valid` leaves the bus idle:
`enable = 0`, `move = 0`, `write = 0`.

Note on LOAD: the control unit does not capture `data`. The bus reads `data` in the cycle
after the LOAD command is sampled, so `data` must be valid during that cycle. The
testbench `tb_mux_bus_system` shows the pattern: the value for a LOAD is presented together
with the following command.

Because `move` is an index and `write` is built from one destination index, the control unit
can never enable two bus sources. It also writes at most one register per cycle. An assertion
in `bus_control_unit` checks the second property (`$onehot0(write)`) in simulation.

## Reset

All state (the four registers and the control unit's outputs) is cleared to zero by the
active-low asynchronous reset `rst_n`. Registers keep their value until they are written.

## How this relates to the original design

The following parts come from the original bus design:

- four 8-bit registers with a clock, an enable and a data input;
- the bus as a 4-to-1 register multiplexer followed by a 2-to-1 multiplexer for external data;
- the 2-bit `move` index and the 4-bit `write` vector;
- operand selection by two 2-to-1 multiplexers;
- the ALU operations and their encoding;
- the split into a data path and a control unit.

Choices and departures made in this RTL:

- **Operand pair for `select = 00`.** The original's summary table lists (R3, R2) for this code.
  Its simulation waveforms show R3 + R1, as does a structure of one multiplexer per operand.
  This RTL uses (R3, R1). The other three codes agree everywhere.
- **`cout` for SHL and AND.** In the original simulations `cout` keeps its previous value
  during SHL and AND, which is a latch. Here it is 0 for those operations, so the ALU has no
  latch. The SUB borrow follows the original waveforms.
- **Control unit.** The original names the control unit's duties: load registers, move data
  between registers, keep to one bus source, share the register clock. It does not give the
  unit's inputs or its insides. The command interface, the registered one-cycle latency and
  the idle values here are this design's own. In the original, `move`, `write` and `enable`
  come straight from outside. To use the datapath that way, instantiate `mux_bus_datapath`
  directly.
- **Reset.** The original registers have no reset; `rst_n` is added here.
- **Extra port.** The bus value is brought out as a port (`bus`) for observation.
- **Not included.** The tri-state version of the same datapath is the original's point of
  comparison and is not included. The original's FPGA results are not reproduced from this
  RTL. Those results are clock-to-output times, a 1 ns clock constraint on a Cyclone IV GX, and
  about 92 mW of estimated total power for either bus.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it hangs.

| Testbench | What it checks |
|---|---|
| `tb_alu` | all 65,536 operand pairs × 4 opcodes against integer arithmetic, plus worked examples |
| `tb_mux2to1`, `tb_mux4to1` | every select value with random, distinct inputs |
| `tb_bus_register` | reset value; loads only on an enabled rising edge, holds otherwise |
| `tb_bus_control_unit` | random LOAD/MOVE/idle commands → exact `enable`/`move`/`write` one cycle later |
| `tb_mux_bus_datapath` | the demonstration below cycle by cycle, then 5,000 random bus cycles against a model |
| `tb_mux_bus_system` | end to end at default size (see below) |

`tb_mux_bus_system` runs the whole machine at its default parameters:

1. It loads the decimal values 55, 77, 99 and 0 into R3, R2, R1 and R0.
2. It rotates them over the bus (R0 ← R1, R1 ← R2, R2 ← R3, R3 ← R0), giving
   R0..R3 = 99, 77, 55, 99.
3. It sweeps all 16 select/op combinations, including the 10000100 example above.
4. It runs 4,000 random cycles of loads, moves and idle cycles against a reference model.

The model applies each command at the second rising edge after it is presented, so a write
that comes a cycle early or late is caught. The testbench counts each mechanism and fails if one never
occurs. The mechanisms are: load, move, idle, an ADD carry, a SUB borrow, each opcode and each
select value.

Each testbench was also run against a deliberately broken copy of its module, and every one of
them reported failures. Examples of the breaks: swapped multiplexer inputs, an ignored load
enable, SUB with reversed operands.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bus_pkg.sv tb/tb_mux_bus_system.sv --top-module tb_mux_bus_system -o sim
./obj_dir/sim
```

Replace `tb_mux_bus_system` with any other testbench name to run that one. `bus_pkg.sv` must
come first on the command line, because every module imports it. Every testbench finishes in
well under a second.

To change the data width, override `WIDTH` on `mux_bus_system` or `mux_bus_datapath`. The
register count is not a parameter: changing it means widening `move`, `write` and the bus
source multiplexer together, and redefining the `select` operand pairs.
