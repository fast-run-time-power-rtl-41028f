# Counter-based run-time power monitor

Gate-level power simulation of a processor running real software is far too
slow to be useful: a program that runs for seconds takes days to simulate. This
design takes another route. Small hardware counters are placed beside the
functional units of a processor core that runs at full speed, for example on an
FPGA emulation board. For each unit they record two numbers:

* **accesses**: how many cycles the unit's inputs changed, and
* **bit switches**: how many input bits toggled in total.

A host processor reads the counters over AHB and passes them to analysis
software on a PC. That software turns them into a power estimate per unit with
a linear model:

    P(unit)  = N_acc * AvgP_acc(unit) + N_bs * AvgP_bs(unit)
    P(total) = sum of P(unit) over all accessed units + BasePower

`AvgP_acc` (power per access) and `AvgP_bs` (power per switched bit) are
characterised off line for each unit with a circuit simulator. The hardware
here supplies `N_acc` and `N_bs` for each unit and a cycle count. The model,
its coefficients and the PC software are not part of this RTL.

The result is relative, not exact. It shows which unit of a program uses the
most power (the program's hot spot) while the program runs at emulation speed.

The configuration built here monitors three units of a DSP core: the **ALU**,
the **instruction decoder** and the **barrel shifter**.

## What is counted, clock by clock

Each monitored unit has one `monitor_unit`. Its inputs are a *data tap* and a
*control tap*: copies of the unit's data input and control signal, wired out
beside the unit. The two taps are joined into one vector `S = {ctrl, data}`.
Every clock edge the monitor stores `S` in a previous-state register. While the
monitor is running, at each edge `k` it compares `S(k)` with `S(k-1)`:

| quantity | added at edge k |
|---|---|
| access count | 1 if `S(k) != S(k-1)` (any bit of data or control changed), else 0 |
| switch count | `popcount(S(k) XOR S(k-1))` |

Example for a 4-bit tap, running from edge 1:

| edge | S | changed bits | access count | switch count |
|---|---|---|---|---|
| 0 (first after clear) | 0000 | not compared | 0 | 0 |
| 1 | 0110 | 2 | 1 | 2 |
| 2 | 0110 | 0 | 1 | 2 |
| 3 | 1001 | 4 | 2 | 6 |

Details that matter when you read the numbers:

* **First sample.** After reset, and in the cycle after a clear, the first
  sample only loads the previous-state register. It is not compared, so the
  counts never include a false toggle against a stale or reset value.
* **Stopped monitor.** The previous-state register keeps tracking the taps
  while the monitor is stopped. When it restarts, the first comparison is
  against the previous clock, not against the value when it stopped.
* **Saturation.** Counters are `CNT_W` bits wide (default 32) and saturate at
  all ones instead of wrapping. A sticky flag in the STATUS register then shows
  that the count is a lower bound. The access counter sets its flag when an
  access arrives at a full counter. The switch counter sets its flag when a sum
  would pass the maximum.
* **Bit counting.** The switch count is a combinational popcount of the XOR
  (`hamming_distance`), so a tap of W bits can add up to W in one cycle. The
  88-bit ALU tap at the default width gives a 7-bit adder tree in front of a
  32-bit accumulator.

## Where the monitor sits

```
           DSP core (not part of this RTL)
   +-------------+ +-------------+ +----------------+
   |     ALU     | |   decoder   | | barrel shifter |
   +--+-------+--+ +--+-------+--+ +--+---------+---+
      | data  | ctrl  | data  | ctrl  | data    | ctrl     taps
   +--v-------v--+ +--v-------v--+ +--v---------v---+
   | monitor_unit| | monitor_unit| |  monitor_unit  |
   +------+------+ +------+------+ +-------+--------+
          | counts        |                |
   +------v---------------v----------------v--------+
   |        ahb_counter_regs (AHB-Lite slave)        |
   |   RUN / CLEAR, cycle counter, STATUS, counters  |
   +------------------------+------------------------+
                            | AHB
            host processor (reads counters) -> UART/JTAG -> PC analysis
```

`power_monitor_top` holds the three monitor units and the register block.
Its ports are an AHB-Lite slave port and six tap inputs:

| port | default width | what to connect (assumed for a C54x-class DSP) |
|---|---|---|
| `alu_data` | 80 | the ALU's two 40-bit operands |
| `alu_ctrl` | 8 | the ALU operation select |
| `dec_data` | 16 | the instruction word at the decoder input |
| `dec_ctrl` | 2 | decoder enable / stall |
| `bs_data` | 40 | the shifter operand |
| `bs_ctrl` | 6 | the signed shift count |

These widths are this design's assumptions; set them with the top's
parameters to match the core you monitor. The taps are sampled on `HCLK`, so
the monitored core must run in the AHB clock domain. There is no
synchronizer.

## Register map and a measurement

32-bit registers, word access only, zero wait states, always an OKAY response.
Address bits 11:2 select the register; decode the slave's region with `HSEL`.

| offset | name | access | content |
|---|---|---|---|
| 0x00 | CTRL | R/W | bit 0 RUN; bit 1 CLEAR (write 1: one-cycle clear of all counters and flags; reads 0) |
| 0x04 | STATUS | R | bit i: ACCESS[i] saturated; bit 8+i: SWITCH[i] saturated; bit 31: CYCLES saturated (sticky until CLEAR) |
| 0x08 | CYCLES | R | clock edges counted while RUN was set |
| 0x0C | CONFIG | R | [7:0] number of units, [15:8] counter width |
| 0x10 + 8i | ACCESS[i] | R | access count of unit i |
| 0x14 + 8i | SWITCH[i] | R | bit-switch count of unit i |

Units: 0 = ALU, 1 = decoder, 2 = barrel shifter. Unmapped offsets read zero,
and writes to them are ignored.

A measurement, as the host software runs it:

1. Write CTRL = 0x2 (CLEAR). All counts, CYCLES and the flags are zero from
   the second clock edge after the write's data phase.
2. Write CTRL = 0x1 (RUN), then start the program on the core.
3. When the program ends, write CTRL = 0x0 (stop).
4. Read CYCLES, STATUS, and ACCESS/SWITCH for each unit.

RUN takes effect at the clock edge that ends the write's data phase, and it is
still seen as set at the edge that ends the stop write's data phase. A window
between the two writes with `n` idle cycles therefore counts `n + 3` cycles.
CLEAR and RUN may be written together (0x3). The counters can also be read
while running, but each read is a separate snapshot. For a consistent set,
stop first.

## Module hierarchy

| file | module | role |
|---|---|---|
| `rtl/pm_pkg.sv` | package | unit numbering, default counter width, AHB encodings, register map |
| `rtl/power_monitor_top.sv` | `power_monitor_top` | the three monitor units and the register block |
| `rtl/monitor_unit.sv` | `monitor_unit` | previous-state register, first-sample handling, one access and one switch counter |
| `rtl/access_counter.sv` | `access_counter` | saturating counter of cycles whose inputs changed |
| `rtl/switch_counter.sv` | `switch_counter` | saturating accumulator of switched bits |
| `rtl/hamming_distance.sv` | `hamming_distance` | combinational popcount of `cur XOR prev` |
| `rtl/ahb_counter_regs.sv` | `ahb_counter_regs` | AHB-Lite slave, RUN/CLEAR, cycle counter, read multiplexer |

An assertion in `ahb_counter_regs` flags any transfer that is not an aligned
word transfer.

## What follows the method and what is this design's own choice

These parts follow the method:

* one access counter and one bit-switch counter per monitored unit;
* the switch count as the Hamming distance between the current and previous
  inputs, accumulated over the run;
* monitoring the ALU, the decoder and the barrel shifter;
* reading the counters over AHB;
* reporting a cycle count with them.

These are this design's own choices:

* **Tap widths.** Taken from general knowledge of a C54x-class DSP.
* **Inputs only.** The taps carry each unit's data input and control signal.
  The method also speaks of switching of data passing *out* of a unit. To
  count that too, widen the data tap and include the unit's output in it.
* **What is an access.** A change in any bit of `{ctrl, data}`. The method
  counts an access when "the input data and control signal" change. One
  published result does not fit this reading: the decoder shows nearly one
  access per cycle, yet only about 13 k bit switches over 1.5 M cycles. That
  fits "count every cycle in which the unit is enabled" better. If you prefer
  that definition, change the `accessed` term in `access_counter.sv` to an
  enable bit of the control tap.
* **Control and registers.** The register map, RUN/CLEAR, the
  first-sample rule, saturation with sticky flags, the AHB-Lite subset and the
  single clock domain.
* **Counter width.** 32 bits. This holds every count in the reported results:
  the largest is 3,930,033,152, below 2^32.

Not included:

* the DSP core and its units;
* the host processor, the AHB fabric, and the UART or JTAG link to the PC;
* the PC analysis software and the per-unit power coefficients.

The top brings the tap inputs and the AHB slave port out as ports so that
these parts can be connected.

Capacity for the sizes reported for this method:

* **Echo-filter run.** This run lasts 1,507,328 cycles. Its largest count fits
  the 32-bit counters.
* **Benchmark loops.** The FIR, IIR and 4x4 matrix-multiply loops run for
  about 61 to 84 million emulator cycles (1.9 to 2.6 s at 32.768 MHz). The
  cycle and access counters hold that. A switch counter saturates only if its
  tap averages more than about 51 switched bits per cycle over the whole run.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module
against a reference model written independently in the testbench: it keeps its
own previous values and uses `$countones` for the bit counts. Each ends with a
line `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_hamming_distance` | 16- and 88-bit instances; corner cases and random vectors |
| `tb_access_counter` | random changes, enable, clear; saturation of a 4-bit counter |
| `tb_switch_counter` | random samples, enable, clear; saturation of an 8-bit counter |
| `tb_monitor_unit` | holds, single-bit and random changes; run/stop; clear; first-sample rule; saturation |
| `tb_ahb_counter_regs` | RUN, one-cycle CLEAR pulse, exact cycle counts, CONFIG, STATUS, single and pipelined reads, unmapped addresses, response signals |
| `tb_power_monitor_top` | end to end with 16-bit counters (see below) |
| `tb_power_monitor_full` | end to end at default parameters (see below) |

`tb_power_monitor_top` drives the taps from a stand-in activity source. The
decoder sees a new instruction most cycles, the ALU new operands on about a
third of the cycles, and the shifter on a few. An AHB master model acts as the
host. The test checks:

* the exact counts after a measurement;
* that activity while stopped is not counted;
* pipelined reads;
* saturation of the ALU switch counter and its STATUS flag;
* clearing.

It counts each of these mechanisms and fails if one never occurs.

`tb_power_monitor_full` runs one complete measurement with every parameter at
its default. The run lasts 1,507,328 counted cycles, the length of the
echo-filter run. It takes about a second.

`tb/ahb_lite_master_if.sv` is the shared AHB master: an interface with write,
read and pipelined-read tasks.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/pm_pkg.sv tb/tb_power_monitor_top.sv \
  --top-module tb_power_monitor_top -Mdir obj_top
./obj_top/Vtb_power_monitor_top
```

Use the same command for any other testbench: name its file and module. To
lint the design:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/pm_pkg.sv rtl/power_monitor_top.sv
```

The remaining lint warnings are expected:

* unused package constants;
* unused address bits above bit 11, `HTRANS[0]`, and the byte-offset bits of
  the unit offset;
* `HRESETn` used both as an asynchronous reset and in the assertion's
  `disable iff`.

## Changing it

* **Tap widths.** Set the six `*_DATA_W` / `*_CTRL_W` parameters of
  `power_monitor_top`.
* **Counter width.** `CNT_W`, from 1 to 32. The register block zero-extends
  narrower counters to 32 bits on read.
* **More units.** Raise `NUM_UNITS` in `pm_pkg` (up to 8, the width of each
  STATUS field). Add a `monitor_unit` instance and its taps in
  `power_monitor_top`. The register block and the register map scale with
  `N_UNITS`.
* **Monitoring another core.** `monitor_unit` has no knowledge of the unit it
  watches. Instantiate one per unit and feed its counts to
  `ahb_counter_regs`.
