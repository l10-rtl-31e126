# One-dimensional digitizer interface

A digitizing tablet finds a pen (a "cursor" coil) by scanning. There is a row of
wires under the writing surface. The cursor's magnetic field couples into those
wires. An analog detector compares the phase of the signal on the wire that is
currently selected, and reports when that wire lies directly under the cursor.
Finding the position is then a digital search: select wire 0, wire 1, wire 2, …
until the detector answers, and report the index of that wire.

This RTL is the digital part of that search, for one axis. A host raises `go`.
The interface steps a counter through the wires, one per clock, and drives the
count out as `grid_data` to select the wire. When the detector raises `int_det`,
the interface copies the count into an output register (`data`) and raises
`dav` ("data available"). The analog grid and detector are not part of the RTL.
They connect through `grid_data` and `int_det`.

```
           go ──► synchronizer ──sgo──► fsm ──dav──►
                                       │ ▲ ▲
                     count_enb, n_clr  │ │ │ int_det ◄── analog grid
                                       ▼ │ err
                                      ctr ───count_data──► grid_data ──► analog grid
                                       │
                                n_ld ──┼─► data_reg ──► data
```

## Blocks

| File | Role |
|---|---|
| `rtl/grid.sv` | Top level. It only instantiates and wires the four blocks below. `GRIDSIZE` = 4 bits, which gives 16 wires. |
| `rtl/synchronizer.sv` | One D flip-flop that brings the asynchronous `go` into the clock domain as `sgo`. |
| `rtl/fsm.sv` | The five-state controller. |
| `rtl/ctr.sv` | The wire counter: enable, active-low synchronous clear, and `err` when the count is all ones. Default `SIZE` = 3; the top sets it to `GRIDSIZE`. |
| `rtl/data_reg.sv` | The output register, with an active-low synchronous load. Default `SIZE` = 3; the top sets it to `GRIDSIZE`. |
| `rtl/grid_pkg.sv` | The state type and its fixed encoding. |

All flip-flops use the rising edge of one clock. `n_clr` and `n_ld` are active
low, and both act only at a clock edge.

## The measurement cycle

This is the part that needs the closest reading. The controller states and
their 3-bit codes are:

| State | Code | Outputs | Next state |
|---|---|---|---|
| READY | 000 | `dav` = not `sgo` | COUNT if `sgo`, else READY |
| COUNT | 001 | `count_enb` | ERRST if `err`; else LOAD if `int_det`; else COUNT |
| LOAD  | 011 | `n_ld` low | RESET |
| RESET | 100 | `n_clr` low | READY |
| ERRST | 010 | `n_clr` low | COUNT |

`count_enb`, `n_ld` and `n_clr` depend only on the state. `dav` also depends on
`sgo`, so it drops in the same clock in which a request arrives. The three
unused codes go to READY.

One measurement, where the cursor lies over wire P:

1. `go` rises at any time. The next rising edge copies it into `sgo`, and `dav` falls.
2. The edge after that moves the controller into COUNT, with the counter at 0.
3. The count goes up by one per clock. While the count is P, the detector raises
   `int_det`. The next edge takes the controller to LOAD. Because `count_enb` is
   still high on that edge, the counter also goes up to P+1.
4. In LOAD, the register takes the count, which is **P+1**.
5. In RESET, the counter is cleared. The controller then returns to READY, and
   `dav` rises if `go` has dropped.

From the edge that samples `go` to the edge after which `dav` is high again
takes **P+4 clocks**. If `go` is still high when the controller returns to
READY, a new measurement starts at once.

### Two properties to know before using `data`

- **Off by one.** `data` is the index of the detecting wire plus one, modulo
  2^`GRIDSIZE`. A host that wants the wire index must subtract one. This design
  keeps that behaviour as the reference design has it, and does not correct it
  in hardware.
- **The last wire cannot be reported.** When the count reaches all ones, `err`
  wins over `int_det`. The controller then goes to ERRST, clears the counter and
  scans again from wire 0. So a cursor over wire 2^`GRIDSIZE`−1 makes the scan
  repeat until the cursor moves. The same repeating scan happens when there is
  no cursor at all. One pass takes 2^`GRIDSIZE`+1 clocks. There is no timeout:
  the interface scans until it finds the cursor or is reset.

## Interface of `grid`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active high: controller to READY, counter cleared |
| `go` | in | 1 | request a measurement (may be asynchronous) |
| `int_det` | in | 1 | from the detector: the selected wire is under the cursor |
| `dav` | out | 1 | idle and result valid |
| `data` | out | `GRIDSIZE` | position: detecting wire + 1 |
| `grid_data` | out | `GRIDSIZE` | index of the wire to energise |

`int_det` is used without a synchroniser. The assumption is that the detector
changes it only in response to `grid_data`, and that it settles within the same
clock period. If your detector is slower, or not tied to this clock, add
synchronising stages to `int_det` and account for their latency. The latency
shifts `data` by the same number of wires.

`data` has no reset. It is meaningful only after the first measurement.

## What follows the reference design and what was chosen here

These parts follow the reference design as it stands:

- the block partition;
- the state encoding, transitions and output equations;
- the counter's clear-over-enable priority and the all-ones `err`;
- the active-low load;
- the single-flip-flop synchroniser;
- the default sizes: 3 bits for the counter and register on their own, 4 bits
  for the top.

This design adds or changes the following:

- **`rst` is new.** The reference design has no reset input. Here, while `rst`
  is high, the controller goes to READY, `n_clr` is forced low so the counter
  starts at zero, and `dav` is held low.
- **Names.** `int` is renamed `int_det`, and the register module is called
  `data_reg`, because `int` and `reg` are SystemVerilog keywords.
- **Unused state codes** fall back to READY.
- **Two assertions in `fsm`:** the register is never loaded while the counter
  runs, and the state register holds only legal codes.

Known limits, kept on purpose:

- `dav` is a combinational (Mealy) output that depends on `sgo`, so it can
  glitch as the state changes. If `dav` leaves the chip or drives an
  asynchronous input, register it.
- The single-stage synchroniser gives no margin against metastability beyond
  one clock period.

## Verification

Each testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `synchronizer_tb` | `sgo` equals `go` as sampled at the last edge, and never changes between edges. |
| `ctr_tb` | A 3-bit and an 8-bit counter against a reference count, with random enable and clear, including clear while enabled. A free-running counter wraps every 2^SIZE clocks. |
| `data_reg_tb` | Random loads against a reference. |
| `regtst_tb` | A free-running counter feeding the register, as in the digitizer. |
| `fsm_tb` | A reference state machine in the testbench, with random inputs. It compares the outputs before and after every edge. Each of the eight transitions, and a reset during a scan, must occur. |
| `grid_tb` | The whole top at its default size (16 wires), with a behavioural detector (`tb/grid_sensor_model.sv`). |

`grid_tb` checks:

- every detectable wire, for position and for latency (P+4);
- a cursor over the last wire, and a missing cursor, both of which cause
  overflow and restart;
- `go` held for several clocks;
- a reset in the middle of a scan;
- that `data` holds and the counter stays cleared while idle.

It also counts starts, scan steps, loads, clears, overflows, resets and `dav`
events, and fails if any of them never occurred.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/grid_pkg.sv tb/grid_tb.sv --top-module grid_tb
./obj_dir/Vgrid_tb
```

Substitute another testbench name for the others. The package file must come
first on the command line.

## Changing the size

`GRIDSIZE` sets the number of wires: there are 2^`GRIDSIZE` of them, and the
last one cannot be reported. The counter and register follow it. `grid_tb`
instantiates the top with its defaults and derives all its expectations from
the local parameter `N`, which must equal `GRIDSIZE`.
