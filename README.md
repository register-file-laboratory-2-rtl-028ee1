# 2-read/1-write register file

A processor instruction such as `add R2, R0, R1` reads two operands and writes
one result in a single clock period. This register file makes that possible.
It has two read ports, A and B, and one write port. There are four 8-bit
registers, R0 to R3. The clock period is split in two:

- **CLK high, first half:** both read ports show the registers picked by their
  addresses. The arithmetic unit works on them and puts its result on the
  write port.
- **Falling edge of CLK:** the result is stored in the register picked by the
  write address, but only if the write control WR is low.

Reads need no clock. Each read port is a multiplexer on the register outputs,
so A and B change as soon as an address or a register changes.

## Structure

```
            WRDATA[7:0] ────────────┬────────┬────────┬────────┐
                                    D        D        D        D
 WR ──► EN  ┌─────────┐ LD0 ──►  ┌──────┐ ┌──────┐ ┌──────┐ ┌──────┐
 WRADDR ──► │ decoder │ LD1 ──►  │ reg8 │ │ reg8 │ │ reg8 │ │ reg8 │
            └─────────┘ LD2 ──►  │  R0  │ │  R1  │ │  R2  │ │  R3  │
                        LD3 ──►  └──┬───┘ └──┬───┘ └──┬───┘ └──┬───┘
                                    Q0       Q1       Q2       Q3
                                    └────────┴───┬────┴────────┘
                         RDADDR_A ──► busmux ◄───┴───► busmux ◄── RDADDR_B
                                        │                 │
                                        A                 B
```

| module        | file                 | role |
|---------------|----------------------|------|
| `regfile`     | `rtl/regfile.sv`     | top: wires up the four registers, the decoder and the two read multiplexers |
| `reg8`        | `rtl/reg8.sv`        | one 8-bit register; loads D at the falling CLK edge while LD is low |
| `decoder`     | `rtl/decoder.sv`     | write-address decoder; pulls LD[WRADDR] low while WR is low |
| `busmux`      | `rtl/busmux.sv`      | 4-to-1 bus multiplexer, Y = D[S]; one per read port |
| `regfile_pkg` | `rtl/regfile_pkg.sv` | default widths: `DATA_W = 8`, `ADDR_W = 2` |

Inside `regfile`, the nets `ld_n[3:0]` are the load strobes LD0 to LD3, and
`q[0:3]` are the register outputs Q0 to Q3.

## Active-low controls

Three controls are active low: WR, RST and the internal LD strobes. The ports
carry `_n` suffixes to show this.

| port       | width | meaning |
|------------|-------|---------|
| `clk`      | 1     | clock; registers load on its **falling** edge |
| `rst_n`    | 1     | reset, active low, **asynchronous**; clears all four registers to 0 |
| `wr_n`     | 1     | write control, active low |
| `wraddr`   | 2     | register to write |
| `wrdata`   | 8     | value to write |
| `rdaddr_a` | 2     | register shown on A |
| `rdaddr_b` | 2     | register shown on B |
| `a`, `b`   | 8     | read data, combinational |

The decoder's truth table: while `wr_n` is 0, only `ld_n[wraddr]` is 0; while
`wr_n` is 1, all four strobes are 1, so no register loads.

## Timing rules

- **Set up a write while CLK is high.** `wr_n`, `wraddr` and `wrdata` must be
  stable before the falling edge. The write happens at that edge.
- **A write shows up in the same period.** Right after the falling edge, a read
  of the register just written returns the new value.
- **No bypass.** Say a port reads the register being written in the same
  period. Before the falling edge it shows the old value; after the edge it
  shows the new one.
- **Both ports may read the same register.**
- **Reset needs no clock.** When `rst_n` goes low, all registers clear at once.
  Note one simulation effect of this: a reset signal that *starts* low at time
  zero makes no falling edge. In that case the registers clear at the first
  falling CLK edge that comes while `rst_n` is still low.

## Which parts follow the source circuit, and which are choices

These parts follow the circuit this RTL is built from:
- the four registers, one decoder and two read multiplexers, and how they
  connect;
- falling-edge loading;
- active-low WR, RST and LD;
- reset to zero;
- the 8-bit data width and 2-bit addresses.

These are this design's own choices, because the circuit leaves them open:
- reset is asynchronous;
- there is no read-during-write bypass;
- the multiplexer inputs are written as an unpacked array, with `d[n]` standing
  for pin Dn.

## Parameters

`regfile` has `WIDTH` (default 8) and `ADDR_W` (default 2). The register count
is `2**ADDR_W`. All submodules scale with them. The defaults give the circuit as
drawn: four byte-wide registers. The register module is still called `reg8` at
other widths.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end. Each also has a watchdog that stops
the run if it hangs.

- `tb_reg8`: checks loads at the falling edge and holds while LD is high. It
  checks that nothing changes at the rising edge, and that reset clears the
  register with no clock edge.
- `tb_decoder`: tries every enable/address combination against the truth
  table.
- `tb_busmux`: tries every select value on random data.
- `tb_regfile`: runs the full design at its default size, in three stages:
  1. The standard bring-up sequence. Reset, then read all registers as zero.
     Write 9 to R1, 13 to R0 and 6 to R2, and read them back in pairs on A and
     B. Reset again and read zeros.
  2. 2000 random clock periods, checked against a reference model. Each period
     checks both ports twice: before the falling edge (old values) and after it
     (new values). It also checks that nothing changes at the rising edge.
     Asynchronous resets are mixed in.
  3. A coverage step. The test fails unless each of these happened at least
     once: a write to each register, a write blocked by WR high, both ports on
     the same register, a read of the register being written, and a reset while
     registers hold data.

To run a testbench with Verilator 5 from the project root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -Irtl \
    rtl/regfile_pkg.sv tb/tb_regfile.sv --top-module tb_regfile -Mdir obj_tb
./obj_tb/Vtb_regfile
```

Use the same command for `tb_reg8`, `tb_decoder` and `tb_busmux`. The package
file must come first on the command line.
