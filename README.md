# Clock-gated synchronous dual-port memory (256 x 8)

A 256-word, 8-bit memory with two fully independent ports on a single clock,
whose clock is switched off by a latch-based clock gate whenever the memory has
nothing to do. A stopped clock means no flip-flop in the memory toggles while
it is idle, which is where a continuously clocked memory spends most of its
dynamic power. Reads are pipelined (address and control are registered first,
the data register is loaded one edge later) to shorten the critical path. Both
ports may read and write at once; when both write one address in the same
cycle, Port 1 wins. Port 2 cannot write the 16 lowest words, and a
single-port mode switches Port 2 off altogether.

```
            en ─┐
                ▼
   clk ──► dpm_clock_gate ──gclk──► dpm_dual_port_ram ─────────────────────┐
                                    │  dpm_write_arbiter (Port 1 priority,  │
   port 1: addr_1 wr_1 datain_1 ──► │  protection, single-port mode)        │──► dataout_1
   port 2: addr_2 wr_2 datain_2 ──► │  mem[256] x 8                         │──► dataout_2
   singleportmode ────────────────► │  stage 1: addr/rd_en regs             │──► p2_status
                                    │  stage 2: dataout regs                │
                                    └───────────────────────────────────────┘
```

## Files

| file | contents |
|---|---|
| `rtl/dpm_pkg.sv` | default sizes (8-bit address, 8-bit data, 256 words, protected range end 16) and the `p2_write_status_e` enum |
| `rtl/dpm_clock_gate.sv` | negative-latch clock gate |
| `rtl/dpm_write_arbiter.sv` | combinational write arbitration |
| `rtl/dpm_dual_port_ram.sv` | array, read pipeline, single-port mode |
| `rtl/dpm_gated_top.sv` | top: clock gate driving the memory |
| `tb/dpm_ref_pkg.sv` | cycle-level reference model used by the memory and top testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Interface of the top, `dpm_gated_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | free-running clock |
| `rst_n` | in | 1 | active-low asynchronous reset: closes the clock gate, clears the pipeline and output registers (not the array) |
| `en` | in | 1 | clock enable: a cycle with `en` high is a memory cycle |
| `singleportmode` | in | 1 | 1 switches Port 2 off |
| `addr_1`, `addr_2` | in | 8 | port addresses |
| `wr_1`, `wr_2` | in | 1 | 1 = write, 0 = read |
| `datain_1`, `datain_2` | in | 8 | write data |
| `dataout_1`, `dataout_2` | out | 8 | registered read data |
| `p2_status` | out | 2 | what happened to a Port 2 write this cycle: done (or none), dropped for conflict, dropped as protected, dropped in single-port mode |

Parameters (`ADDR_W`, `DATA_W`, `DEPTH`, `P2_PROT_END`) default to 8, 8, 256
and 16. `P2_PROT_END = 0` turns the write protection off.

## Clock gating

`dpm_clock_gate` is the standard glitch-free gate: a latch that is
transparent while `clk` is low follows `en`, and holds while `clk` is high;
the gated clock is `clk AND latched_en`. Because the latched enable can only
change in the low phase, the gated clock is either a complete high pulse or
nothing — a change of `en` during the high phase cannot chop or create a
pulse, it simply applies to the next cycle.

The whole memory — array, address registers and output registers — runs on
the gated clock. With `en` low the memory is frozen: outputs hold, write
requests are ignored, nothing is lost. The reset is asynchronous so that it
acts even while the clock is gated off; reset also closes the gate.

What this means for a user: settle `en` (like every other input) before the
rising edge of `clk`. A read or write happens only in cycles whose `en` was
high, and the two-edge read latency below counts *memory* cycles, not `clk`
cycles.

A variant of this gate also stops the latch's own clock when the enable
already equals the latched value (saving the latch's toggling). That changes
no output and is not built here.

## Read pipeline and timing

This is the part most likely to surprise. A read goes through two register
stages:

1. at memory edge N, the address and a read enable (`rd_en = !wr`) are
   captured in `addr_x_pipe` / `rd_en_x_pipe`;
2. at memory edge N+1, the array word at `addr_x_pipe` is loaded into
   `dataout_x` — but only if `rd_en_x_pipe` is set.

```
 memory edge      N            N+1          N+2
 addr_1        A (read)     B (write)     ...
 addr_1_pipe        ───► A        ───► B
 dataout_1                   ───► mem[A]   (holds: B was a write)
```

So data for an address presented before edge N appears after edge N+1, one
cycle later than a plain synchronous RAM. A write cycle does not load the
port's output register: `dataout_x` keeps the last read value.

Writes use the address as presented and take effect at edge N. At a single
edge the array is read before it is written; combined with the pipeline this
gives a simple rule: a read sees every write made in the same or any earlier
cycle. In particular, if one port writes address A while the other presents
a read of A in the same cycle, the reader gets the new data.

## Write arbitration and protection

`dpm_write_arbiter` decides, combinationally, which writes reach the array:

| Port 1 | Port 2 | result |
|---|---|---|
| write | read | Port 1 writes; Port 2 reads (same or other address) |
| read | write | Port 2 writes (unless protected); Port 1 reads |
| read | read | both read, also from the same word |
| write A | write B ≠ A | both write |
| write A | write A | Port 1 writes, Port 2's data is dropped |

On top of this, Port 2 may never write addresses `0 .. P2_PROT_END-1`
(00h–0Fh), intended for configuration data; Port 1 may. Port 1's writes are
never refused. `p2_status` reports which rule dropped a Port 2 write (if
several apply, single-port mode is reported before protection, protection
before conflict).

## Single-port mode

With `singleportmode = 1`, Port 2 is switched off: its writes are refused,
its address register stops toggling, and `dataout_2` is cleared to zero with
the same two-edge latency as a read. Port 1 is unaffected. When the mode is
released, Port 2 reads again from the next presented address. The exact
behaviour of this mode (clearing `dataout_2` to zero, blocking writes) is
this implementation's interpretation of "Port 2 not needed"; adjust
`dpm_dual_port_ram` stage 1/2 and the arbiter if your system expects
something else.

## Decisions that are this implementation's own

- Reset: asynchronous, active low, on the pipeline and output registers and
  the clock-gate latch. The array is not reset (like FPGA block RAM); read a
  word only after writing it.
- Writes are not pipelined; read-before-write at one edge.
- `p2_status` is an extra output for observability and verification; leave
  it unconnected if not needed.
- In the arbiter, `we_1` is simply `wr_1`.

## Size and resources

At the defaults the memory is 2048 bits of array, 27 flip-flops (two 8-bit
address registers, two 8-bit output registers, three control bits) and one
latch, plus an 8-bit comparator and a few gates. The array is written in a
form FPGA tools map to a true dual-port block RAM. Published numbers for a
comparable FPGA implementation are in the range of 15 LUTs with a large
drop in dynamic power against the ungated memory; those figures depend on
the tool flow and device and are not reproduced by anything in this
repository.

## Verification

`dpm_dual_port_ram` carries an assertion that the two ports never write the
same word in one cycle; build with `--assert` to check it.

Each testbench drives inputs on the falling clock edge, checks right after
the rising edge, and ends with a `TB_RESULT checks=N failures=M` line.

- `tb_dpm_clock_gate`: random enables, including changes in the high phase;
  gated clock follows the latched enable, never changes mid-pulse, stays low
  in reset; pulse count equals enabled cycles.
- `tb_dpm_write_arbiter`: all five port-operation cases, the protection
  boundary (0Fh/10h), single-port mode, 7000 random vectors against an
  independent rule.
- `tb_dpm_dual_port_ram`: reset values, exact read latency, each
  port-operation case with literal expected values, protection, single-port
  mode, then 4000 random cycles on a narrow address window against
  `dpm_ref_pkg`.
- `tb_dpm_gated_top` (full size, default parameters): fills and reads back
  all 256 words checking latency, replays a reference stimulus sequence
  (DEh→AAh, ADh→BBh, CAh→01h, a refused Port 2 write of FEh to 02h, then
  single-port mode), checks that nothing moves while the clock is gated off,
  then 6000 random cycles with random enable. It counts gated cycles,
  conflicts, protected writes, single-port drops and clears, same-cycle
  read-after-write and dual writes, and fails if any never occurred.

Run one with plain Verilator, e.g. the top:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  rtl/dpm_pkg.sv tb/dpm_ref_pkg.sv rtl/dpm_clock_gate.sv rtl/dpm_write_arbiter.sv \
  rtl/dpm_dual_port_ram.sv rtl/dpm_gated_top.sv tb/tb_dpm_gated_top.sv \
  --top-module tb_dpm_gated_top
./obj_dir/Vtb_dpm_gated_top
```

For the other testbenches use the same command with the matching subset of
files and `--top-module`. Verilator is a two-state simulator: unwritten array
words hold random values, which is why the reference model tracks which
words are known.

## Limits

- Power and timing are not modelled; the clock gate is written as RTL
  (latch + AND). On an ASIC, replace it with the library's integrated
  clock-gating cell; on an FPGA, a clock-enable or a global buffer with
  enable is usually preferred to gating in fabric.
- The ungated baseline memory is not included; it is `dpm_dual_port_ram`
  driven directly by `clk`.
