# DARKMEM: power-managed private local memory for accelerators

A fixed-function accelerator spends most of its area on its private local
memory (PLM): many SRAM banks that hold a few rows or tiles of the data it is
working on. Their leakage is a large share of the accelerator's power, yet
much of the time many banks are either not needed at all (the accelerator
was configured for a small problem) or hold data that nobody will touch for a
while (the compute process has finished a buffer and the DMA engine has not
yet been granted the bus).

DARKMEM attacks both cases with dual-rail SRAM banks, each with two
power-gating pins, and two small controllers per data structure:

* the **scenario memory controller (SMC)** looks at a configuration register
  when an execution starts and gates, for the whole execution, the banks the
  configured problem size never reaches;
* the **operating mode controller (OMC)** moves the remaining banks between
  *active*, *deep-sleep* and *idle* when the accelerator says, through a
  valid/ready handshake, that a buffer is in use, waiting, or empty.

The two controllers' outputs are ORed per bank, so a bank is gated if either
of them wants it gated. This repository holds synthesizable SystemVerilog for
the controllers, the data-path glue and a complete three-array PLM for a
Debayer (image demosaicing) accelerator, plus behavioural models of the two
analog/process-specific parts: the dual-rail SRAM macro and the voltage
controller.

## Operating modes and power pins

Each bank has `PGL` (periphery gate) and `PGM` (memory-cell gate); 1 means
gated. The cell supply can additionally be lowered to the data retention
voltage by a voltage controller (a bias generator or an integrated regulator).

| mode         | PGL | PGM | cell supply            | data     | access |
|--------------|-----|-----|------------------------|----------|--------|
| `PM_ACTIVE`     | 0 | 0 | nominal                | kept     | yes    |
| `PM_DEEP_SLEEP` | 1 | 0 | retention (with a VC)  | kept     | no     |
| `PM_IDLE`       | 1 | 1 | (gated)                | **lost** | no     |

A bank masked by the SMC sees `PGL = PGM = 1` whatever the OMC does.
The types live in `rtl/darkmem_pkg.sv` (`pmode_e`, `pg_pins_t`, `pins_of()`).

## The mode-change handshake (omc)

This is the part a user of the memory must get right. Each unit has a power
port next to its data port:

* `pm_mode` (2 bits) and `pm_valid` from the accelerator,
* `pm_ready` back to it.

The accelerator raises `pm_valid` with the mode it wants and holds both
unchanged until it sees `pm_ready` high at a clock edge; that edge completes
the request. `pm_ready` is high only while the unit is settled in the
requested mode, so:

* asking for the mode already in force completes in the same cycle;
* a real change stalls the accelerator until the banks have settled;
* no data access can fall into a transition. An assertion in `darkmem_unit`
  flags any access while the unit is not settled in active mode, and another
  one in `omc` flags a request dropped or changed before `pm_ready`.

The OMC counts the transition latencies itself (`PG_LAT` for the sleep
transistors, `VC_LAT` for the supply ramp). Stall length, from the first
cycle `pm_valid` is seen to the cycle `pm_ready` is high:

| transition                      | sequence                                  | stall (cycles)        |
|---------------------------------|-------------------------------------------|-----------------------|
| active/idle -> deep-sleep       | set pins, wait PG; lower supply, wait VC  | PG_LAT + VC_LAT + 1   |
| deep-sleep -> active            | raise supply, wait VC; release PGL, wait PG | VC_LAT + PG_LAT + 1 |
| any other change (to/from idle) | set pins, wait PG                         | PG_LAT + 1            |
| same mode                       | none                                      | 0                     |

The general rule: a change costs `PG_LAT` if any pin changes, plus `VC_LAT`
if the cells go to or come back from retention voltage, plus one cycle.

### SRAM libraries

Two parameters select the kind of SRAM and supply the memory is built for:

| library | `USE_VC` | `DUAL_RAIL` | deep-sleep means                         |
|---------|----------|-------------|------------------------------------------|
| ULP (default) | 1  | 1           | periphery gated and supply at retention   |
| LP      | 0        | 1           | periphery gated only                      |
| STD     | 1        | 0           | supply at retention only, no pin changes  |

Idle gates the whole bank in all three. Without a voltage controller the VC
steps vanish; with single-rail SRAMs the gating steps into and out of
deep-sleep vanish. Defaults are `PG_LAT = 10` and
`VC_LAT = 64`, the slow end and the fast end of the latency ranges the method
was evaluated with (gating 2 to 10 cycles, supply 64 to 2,000 cycles). After
reset the unit is active, so an accelerator that never uses the power port
behaves as with ordinary memory.

A typical double-buffered use, per output buffer: the compute process fills
it and requests deep-sleep; when the DMA engine gets the bus, the store
process requests active (stalling for the wake-up if it has not finished),
reads the buffer out and requests idle; the compute process requests active
before refilling it.

## Scenario masking (smc)

At design time a handful of *scenarios* is chosen, each a range of a
configuration register and a bank mask. In hardware this is a comparator
chain: scenario *s* is selected when `cfg_value <= SCEN_CFG_MAX[s-1]`, first
match wins (list them smallest first); no match means the default scenario,
in which the whole memory is used and nothing is masked. The mask is sampled
on `cfg_start` and held until the next one, because configuration registers
only change between executions. Bit *i* of a mask belongs to bank *i*.

In the Debayer memory the image width is the configuration register: widths
up to 1,024 pixels select scenario s1, which uses half of each array and gates
the upper half of its banks.

## Address mapping (data_ctrl)

Within a unit the banks form one logical array. The upper address bits select
the bank, the lower `log2(BANK_DEPTH)` bits address the word inside it; only
the selected bank gets a chip enable. Read data come back one cycle after the
request, steered by the bank index registered with it. `BANK_DEPTH` must be a
power of two; the bank count need not be.

## Voltage controller and sharing

Each unit outputs `vc_low` (cells may go to retention voltage) and takes
`vdd_ok` (supply at nominal, required for any access). The top gives every
unit its own controller by default. With `SHARE_VC = 1` one controller serves
all three units and `vc_merge` lowers it only when every unit asks for
retention, i.e. the highest requested voltage wins. The OMC's fixed `VC_LAT`
wait stays correct when shared, since a ramp from any level back to nominal
takes at most `VC_LAT` cycles.

## The Debayer memory (darkmem_plm, the top)

Three DARKMEM units, all with 1,024 x 32 banks and the image width as the
configuration register:

| unit | role                                   | banks | words  | masked in s1 |
|------|----------------------------------------|-------|--------|--------------|
| A    | input image rows (ten 2,048-pixel rows) | 20   | 20,480 | banks 10-19  |
| B0   | output row, ping                        | 2    | 2,048  | bank 1       |
| B1   | output row, pong                        | 2    | 2,048  | bank 1       |

Total 96 KiB. Top-level ports per unit: a data port (`x_ce`, `x_we`,
`x_addr`, `x_wdata`, `x_rdata`) and a power port (`x_pm_mode`,
`x_pm_valid`, `x_pm_ready`) for `x` = `a`, `b0`, `b1`; shared `cfg_start` and
`cfg_width`; and, for observation, every bank's power pins, the scenario and
mode of each unit and each unit's cell supply in millivolts. The accelerator's
own logic (the load, compute and store processes) is not part of this design
and connects to these ports.

Parameters: `PG_LAT` (10), `VC_LAT` (64), `USE_VC` (1), `DUAL_RAIL` (1),
`SHARE_VC` (0), `A_BANKS` (20).

## Files

| file | contents |
|------|----------|
| `rtl/darkmem_pkg.sv` | mode enum, pin struct, mode-to-pin function |
| `rtl/dual_rail_sram.sv` | behavioural model of a dual-rail SRAM bank |
| `rtl/data_ctrl.sv` | bank select and read-data steering |
| `rtl/smc.sv` | scenario memory controller |
| `rtl/omc.sv` | operating mode controller FSM |
| `rtl/voltage_controller.sv` | behavioural model of the cell-supply controller |
| `rtl/vc_merge.sv` | request merge for a shared voltage controller |
| `rtl/darkmem_unit.sv` | one DARKMEM unit |
| `rtl/darkmem_plm.sv` | the Debayer PLM, top |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_darkmem_plm.sv` | end-to-end test, shared voltage controller, short latencies |
| `tb/tb_darkmem_plm_full.sv` | end-to-end test with every parameter at its default |
| `tb/tb_darkmem_plm_lp.sv`, `tb/tb_darkmem_plm_std.sv` | end-to-end test for the LP and STD libraries |
| `tb/darkmem_plm_seq.svh` | the end-to-end sequence all four include |
| `tb/tb_debayer_double_buffer.sv` | concurrent double-buffering workload, cycle overhead |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends itself; a
watchdog ends a hung run with a failure. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/darkmem_pkg.sv tb/tb_darkmem_plm_full.sv --top-module tb_darkmem_plm_full
./obj_dir/Vtb_darkmem_plm_full
```

Replace the testbench name for any other test. Each finishes in well under a
second.

The end-to-end tests play a Debayer-like accelerator through three executions
(widths 2,048, 1,024 and 2,000): load rows into A, park A in deep-sleep,
compute each output row from A into B0/B1 in turn, park the row in
deep-sleep, wait a random "bus busy" time, wake it, read it out and check
it, send it to idle; finally all three units sit in deep-sleep together. They
check every data word, every stall length against the table above, the bank
pins against the scenario masks, and that each mechanism occurred: stalls,
deep-sleep and idle entries, wake-ups from both, data retained in deep-sleep,
data lost in idle (the SRAM model fills gated cells with `0xDDDDDDDD`),
scenario masking, supply at retention voltage and, with a shared controller,
a unit in deep-sleep whose supply another unit holds at nominal.

`tb/tb_debayer_double_buffer.sv` runs the same kind of workload with the
compute and store processes concurrent, as a double-buffered accelerator
does: ten input rows, ten output rows through B0/B1, random bus delays before
each store, all parameters at their defaults. It runs the workload once with
no power requests and once with them. In that run power management costs
about 1.1 % more cycles: most of each deep-sleep entry still stalls the compute
process, while the wake-ups before each store hide behind computation.

## How far to trust it, and where it is this design's own

Taken from the DARKMEM method: the three modes and their pin meaning; one
SMC, one OMC and one data controller per data structure; OR-combination of
mask and mode; the mode/valid/ready handshake that stalls the accelerator
during transitions; MSB bank selection; scenario identification from a
configuration register with the full memory as the default; optional
per-unit or shared voltage controllers keeping the highest requested voltage;
the latency ranges; the Debayer example (two 1,024 x 32 banks per output row,
scenario for 1,024 x 1,024 images, mask "01" meaning the second bank gated);
three PLM arrays and about 0.095 MB for Debayer.

Choices of this design, where the method leaves the detail open:

* the exact handshake timing, the order of supply and gating steps, and
  reset into active mode;
* the `<=` comparator chain for scenario identification, and one
  configuration register per unit;
* the third Debayer array being the input-row buffer, its size (chosen to
  bring the total near 0.095 MB), the 2,048-pixel full width and A's mask;
* pin polarity (1 = gated), one-cycle SRAM read latency, 2-bit mode encoding;
* the voltage values (1,000 mV nominal, 400 mV retention) and linear ramp of
  the voltage-controller model.

Not modelled: the accelerator logic itself; the design-time optimisation that
picks SRAM types and bank counts per array (its result is simply the
parameters of each unit); and all power numbers, which depend on the SRAM
library's characterisation rather than on the logic. The STD library
(voltage control without dual-rail SRAMs) is modelled only as far as its pins
go: idle is taken to gate the whole bank there too. `dual_rail_sram` and
`voltage_controller` are behavioural stand-ins for a vendor macro and an
analog block and must be replaced by the real parts for implementation.
