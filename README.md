# Tri-state clock-steered 8-bit ALU

In a conventional ALU, the arithmetic and the logic sections get the clock on every
cycle, though only one of them produces the result that is wanted. All that
switching in the idle section is dynamic power spent for nothing. This design
splits an 8-bit ALU into two units, each with its own result register, and
feeds the clock through a pair of tri-state buffers. Only the unit in use gets
the clock. The other unit's clock net is released to high impedance, so its
register and the logic in front of it stay still.

The idea comes from published work on low-power ALUs that use tri-state clock
steering. That work gives the operation table, the two-unit split and the clock
switch. Everything else here (the enable latch, the hold behaviour, the unit
assignment, the absence of a reset) is this design's own choice, listed under
"Departures and open points" below.

## Operations

`sel[2]` picks the unit, and `sel[1:0]` picks the operation inside that unit.

| sel | operation   | unit       | result       |
|-----|-------------|------------|--------------|
| 000 | AND         | logic      | `yl = a & b`    |
| 001 | NAND        | logic      | `yl = ~(a & b)` |
| 010 | NOR         | logic      | `yl = ~(a \| b)` |
| 011 | BUFFER A    | logic      | `yl = a`        |
| 100 | SUBTRACTION | arithmetic | `ya = a - b`    |
| 101 | DECREMENT   | arithmetic | `ya = a - 1`    |
| 110 | ADDITION    | arithmetic | `ya = a + b`    |
| 111 | CLEAR       | arithmetic | `ya = 0`        |

Arithmetic wraps modulo 2^WIDTH. There are no carry, borrow or overflow outputs.
For a code that belongs to the other unit, a unit keeps its output.

## The tri-state clock switch

`tri_clock_switch` is the heart of the design, and the part most worth
understanding before you change anything.

```
            en_q  ┌──────────┐
 en ──►[latch, open while clk=0]──┬──► tri_buf(x=clk, en=en_q)  ──► clk_t1
                                  └─►o tri_buf(x=clk, en=!en_q) ──► clk_t2
 clk ─────────────────────────────────────┘
```

- With `en = 1`, `clk_t1` carries `clk` and `clk_t2` is high impedance.
- With `en = 0`, it is the other way round.
- The two gated clocks are never driven at the same time.

**Why the latch.** If the buffer enables followed `en` directly, a change of
`en` while `clk` is high would cut a clock pulse short or add an edge. That
would clock the wrong register. So the enable goes through a latch that is
transparent only while `clk` is low. It can therefore change only while both
gated clocks are low. As a result, `en` takes effect from the next rising edge
of `clk`, and changes of `en` while `clk` is high are ignored until `clk` falls.
The circuit this design follows also stores the enable in an element clocked by
`clk` before the buffers. Making that element a negative-level latch is this
design's choice.

**The released net.** A tri-state clock net floats when it is released. On
silicon, give each gated clock net a weak pull-down or a bus keeper, so the
registers behind it see a steady 0. Two-state simulators such as Verilator read
a released net as 0. The testbenches declare the switch outputs as `tri0`
wherever they observe them directly.

**Synthesis.** Yosys maps the switch to one `$dlatch` and two `$tribuf` cells.
On an FPGA, the tri-state buffers usually become multiplexers, or can only be
placed at I/O. On an ASIC, a library clock-gating cell can replace the latch and
buffer pair, but the point of this design is the tri-state variant. Clock-tree
and timing constraints for the two gated clocks are left to the implementation.

## The two units

`arith_unit` and `logic_unit` each hold:

- a combinational result multiplexer over `sel[1:0]`;
- a `WIDTH`-bit register.

The register loads on a rising edge of the unit's own clock when `sel[2]` names
that unit, and holds otherwise. Neither register has a reset, which keeps the
pin count at 37 for WIDTH = 8. To give the outputs a known value after
power-up, run CLEAR with `en = 1`, then AND with `b = 0` and `en = 0`.

## Top level: `tri_alu`

| port  | dir | width | meaning |
|-------|-----|-------|---------|
| clk   | in  | 1     | clock |
| en    | in  | 1     | 1: clock the arithmetic unit; 0: clock the logic unit |
| a, b  | in  | WIDTH | operands |
| sel   | in  | 3     | operation (table above) |
| ya    | out | WIDTH | arithmetic result register |
| yl    | out | WIDTH | logic result register |

`WIDTH` defaults to 8, which gives 37 pins, 16 flip-flops and one latch. The
width can be set to 16, 32 or 64 without other changes.

**Timing.** Set `a`, `b`, `sel` and `en` while `clk` is low. The selected
unit's output changes right after the next rising edge, a latency of one cycle.
Drive `en` equal to `sel[2]` to execute an operation. If `en` and `sel[2]`
differ, the selected unit has no clock, the clocked unit ignores the code, and
both outputs hold. That can be used to freeze the ALU. In a processor, `en`
would simply be `sel[2]`, registered or decoded by the controller. It is kept as
a pin here, as in the original design.

## Departures and open points

- **Two outputs, not one.** `ya` and `yl` are separate outputs. The two result
  registers are not multiplexed onto one `ALU_out`.
- **Unit assignment.** The arithmetic unit sits on `clk_t1` (`en = 1`) and the
  logic unit on `clk_t2` (`en = 0`). The source does not state this pairing. It
  was chosen so that `en = sel[2]` for an executing operation.
- **Enable latch.** Added for glitch-free gating, as explained above.
- **DECREMENT** decrements `a`.
- **No status outputs.** There are no flags.
- **No power model.** This RTL reproduces none of the power figures reported for
  the original, for two reasons. Power depends on the cell library and layout.
  And the saving relies on the released clock net not toggling, which a
  simulator shows only as edge counts. The end-to-end testbench counts those
  edges: each clock edge reaches exactly one unit.
- **No baseline.** The ungated baseline ALU, with both registers on the free
  clock, is not included.

## Files

- `rtl/alu_pkg.sv`: operation enum and the unit-select helper
- `rtl/tri_buf.sv`: tri-state buffer, parameterizable width
- `rtl/tri_clock_switch.sv`: enable latch and two tri-state buffers
- `rtl/arith_unit.sv`: SUBTRACTION, DECREMENT, ADDITION and CLEAR, with the `ya` register
- `rtl/logic_unit.sv`: AND, NAND, NOR and BUFFER A, with the `yl` register
- `rtl/tri_alu.sv`: the top level
- `tb/tb_*.sv`: one self-checking testbench per module

There are two more testbenches:

- `tb/tb_tri_alu.sv` runs the default 8-bit top for 3000 random cycles. It
  counts each mechanism it exercises: every operation, each unit gated off, en
  switches in both directions, and en changing while `clk` is high. It also
  checks the gated clock edge counts.
- `tb/tb_tri_alu_widths.sv` runs 16-, 32- and 64-bit instances against a 64-bit
  reference.

Every testbench prints `TB_RESULT checks=N failures=M` at the end.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal -Irtl -y rtl \
    rtl/alu_pkg.sv tb/tb_tri_alu.sv --top-module tb_tri_alu -Mdir obj_tb_tri_alu
./obj_tb_tri_alu/Vtb_tri_alu
```

Replace `tb_tri_alu` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/alu_pkg.sv rtl/<module>.sv`.
