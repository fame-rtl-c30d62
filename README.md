# FAME: fault-attack aware extensions for an in-order processor

Fault attacks break embedded software by disturbing the processor at a chosen
moment. A typical attack shortens one clock cycle so that the results computed
in it are wrong, then reads the faulty output. Classic countermeasures repeat
the work in hardware or software, which costs area or time. FAME splits the job
in two:

- **Hardware detects the fault.** A small sensor raises an alarm in the cycle
  after a glitched one. The hardware then stops any more faulty results from
  reaching the architectural state. It also keeps the little state that
  software needs to undo the damage.
- **Software decides what to do.** A non-maskable trap hands control to a
  trap handler. The handler can restore the pre-fault state and resume. It can
  also change keys, abort a session, or raise an alert.

This repository holds the hardware side as SystemVerilog. It has four parts:
the clock-glitch sensor (Fault Detection Unit, FDU), the mode state machine
(Fault Control Unit, FCU), the ping-pong Fault Response Registers (FRRs) with
their ancillary-state-register (ASR) interface, and the gate on
register-file, flag and data-cache writes. The host processor is not included.
It is a 7-stage SPARC-style integer pipeline: fetch F, decode D, register
access A, execute E, memory M, exception X, write-back W. It connects to
`fame_top` through ports.

## The fault timeline, and why the FRRs look the way they do

Three clock cycles matter. Everything else follows from them.

| cycle | what happens |
|-------|--------------|
| C_b (before fault) | Normal cycle. Whatever is computed here is correct. |
| C_f (fault) | Shortened by the attacker below the critical path. Values computed in this cycle may be wrong, and so may the writes committed at its end. |
| C_a (after fault) | `alarm` is high. The FCU acts during this cycle. |
| C_a+1 | Every stage is annulled. F holds the first trap-handler instruction. The processor is in safe mode. |

During C_f the W-stage instruction (I2) writes the register file and PSR
flags, and that write may be corrupted. The X-stage instruction (I3) is the
oldest one that has not committed, so execution resumes at I3. To repair I2's
write and resume at I3, the handler needs three things:

- (a) I2's register write: enable, 5-bit index and data;
- (b) the PSR condition flags (icc) written with it;
- (c) I3's address.

A single copy of these, loaded every cycle, would be overwritten with faulty
values at the end of C_f. So every FRR is a *pair* of shadow registers, loaded
alternately (`frr_pingpong`). Both take the same values as the pipeline
register they shadow, i.e. what enters the W-stage and X-stage registers. Only
one of them is written per edge:

```
edge ending C_b : shadow s  <- {I2's write, I2's flags, I3's address}   (correct)
edge ending C_f : shadow ~s <- {I3's write, ..., I4's address}          (maybe faulty)
C_a (alarm)     : both frozen, until the handler has completed
```

`bufsel` names the shadow written at the last unfrozen edge, which is the
one written in C_f. So `bufsel = 1` means "use shadow 0" and `bufsel = 0` means
"use shadow 1". The handler uses this rule. A fault in C_f cannot reach the
other shadow.

## Fault Detection Unit (`fame_fdu`, `fdu_delay_chain`)

```
        +--NOT--+
        |       |
        +-> toggle FF --+--------------------> capture FF --+
                        |                                   XOR --> alarm
                        +--> delay chain (T_delay) -> dummy FF -+
```

The toggle flip-flop inverts on every edge. The capture flip-flop sees the new
value at once. The dummy flip-flop sees it only after `T_delay`, which is set
slightly longer than the processor's critical path. In a normal cycle both
flip-flops capture the same value. In a cycle shorter than `T_delay` the dummy
flip-flop still captures the old value, and the XOR is high for the following
cycle. That cycle is C_a.

- `alarm` is the plain XOR of two flip-flops. It is high for exactly one cycle
  and needs no extra register.
- Two glitches in a row produce one alarm, not two: the toggle value changes
  twice within one `T_delay` window. The first glitch is still caught.
- `fdu_delay_chain` is a **behavioural model**, not synthesizable logic. It
  models `N_BUF` buffers (default 15) with `T_DELAY_NS/N_BUF` each (default
  15 ns in total). Like real buffers, it passes any pulse longer than one
  buffer delay intact. In silicon it is a placed and timed buffer chain, sized
  by worst-case static timing analysis.
- Synthesis of `fame_fdu` shows the consequence: with the delay gone, capture
  and dummy are the same signal, so `alarm` becomes constant 0. The FDU only
  works as drawn when its timing is kept.

The 15 ns default is this design's choice. The reference prototype runs at
62.5 MHz (16 ns period), and `T_delay` has to lie between the critical path
and the clock period. Set `T_DELAY_NS` to your own critical path plus margin.

## Fault Control Unit (`fame_fcu`)

The FCU has two modes: **nominal** and **safe**.

| mode | event | action | next mode |
|------|-------|--------|-----------|
| nominal | no alarm | none | nominal |
| nominal | alarm | start the trap handler | safe |
| safe | alarm | restart the trap handler | safe |
| safe | handler completed, no alarm | none | nominal |

If an alarm and the handler's completion come in the same cycle, the alarm
wins. So safe mode is only left by a handler run that nothing disturbed.
Handler completion is `th_done`, the retirement of the handler's `RETT`. It
is ignored in nominal mode, because ordinary traps also end in `RETT`.

Outputs during the alarm cycle are combinational from `alarm`:

- `trap`: the host annuls all stages at the next edge and fetches the first
  handler instruction.
- `wr_block`: drops this cycle's register-file, flag and data-cache writes.
  These come from I3 in W and I5 in M, both computed during or after C_f.
- `frr_freeze`: stays high for the whole of safe mode.
- `th_restart`: marks a trap raised in safe mode.

`mode` changes at the edge after the alarm. An assertion checks that every
alarm leads to safe mode.

## FRR bank and its software interface (`fame_frr_bank`)

One `frr_pingpong` pair, 74 bits wide, holds `{we, index[4:0], data[31:0],
icc[3:0], pc[31:0]}` (type `frr_entry_t` in `fame_pkg`). Software reaches it
through ASRs:

| ASR | RDASR returns | WRASR (safe mode only) |
|-----|---------------|------------------------|
| %asr20 | shadow 0: `[4:0]` index, `[5]` write enable, `[9:6]` icc, `[31]` bufsel | - |
| %asr21 | shadow 1: same layout | - |
| %asr22 | shadow 0: write data | restore with shadow 0 |
| %asr23 | shadow 1: write data | restore with shadow 1 |

A WRASR of a register index to %asr22 or %asr23 is a command. If the chosen
shadow recorded a write, the hardware writes the shadow's data into that
register. It also writes back the shadow's flags. The value written to the ASR
is not stored.

When the trap is taken, the hardware writes the resume address into `%l1`
(r17). This is the address held in the valid shadow, i.e. I3's address. The
write happens in the alarm cycle, on the register-file port that `wr_block`
has just freed.

The handler this interface is built for restores the state and resumes:

```
FLUSH                      ; discard possibly faulty cache lines
RDASR %asr20, %l3
RDASR %asr21, %l4
if %l3[31] (bufsel) = 1:   AND %l3, 0x1f, %l3 ; WRASR %l3, %asr22
else:                      AND %l4, 0x1f, %l4 ; WRASR %l4, %asr23
RETT %l1                   ; back to nominal mode, resume at I3
```

Other policies use the same hardware. A handler can, for example, change the
key and restart the encryption, clear secrets, or escalate after repeated
alarms.

## Commit guard (`fame_commit_guard`)

The commit guard is combinational. It sits between the pipeline and the
architectural state, and decides what reaches the register-file port, in
this priority order:

1. In the alarm cycle: the `%l1` write. The pipeline's register, flag and
   data-cache writes are dropped.
2. Otherwise, a restore request from the FRR bank. WRASR is taken from the
   W stage, where the WRASR itself writes no register, so the port is free.
3. Otherwise, the pipeline's own writes.

## Connecting a host pipeline (`fame_top`)

| port | direction | meaning |
|------|-----------|---------|
| `clk`, `rst_n` | in | processor clock (the one an attacker can glitch), asynchronous active-low reset |
| `xw_wr`, `xw_icc` | in | register write and flags entering the W-stage register |
| `mx_pc` | in | address of the instruction entering the X-stage register |
| `w_rf`, `w_icc_we`, `w_icc` | in | write requests of the W stage |
| `m_dc_we` | in | data-cache write of the M stage |
| `asr_rd_addr` | in | RDASR register number, X stage |
| `asr_wr_en`, `asr_wr_addr`, `asr_wr_data` | in | WRASR, W stage |
| `th_done` | in | the handler's RETT retires |
| `alarm`, `mode`, `trap`, `th_restart`, `bufsel` | out | status, and the trap request (annul everything, fetch the handler at the next edge) |
| `asr_rd_hit`, `asr_rd_data` | out | RDASR result for %asr20..23 |
| `rf_wr`, `icc_we`, `icc`, `dc_we` | out | gated writes to the register file, PSR flags and data cache |

The host has a few responsibilities that are not in this RTL:

- choosing the trap vector;
- switching register windows on the trap (the 5-bit index and `%l1` refer
  to the current window);
- implementing FLUSH and RETT.

Its RDASR/WRASR decode must send %asr20..23 here.

## How far it has been checked

Each module has a self-checking testbench in `tb/`. Each compares against a
model that the testbench computes itself, and ends with a `TB_RESULT` line.

| testbench | what it checks |
|-----------|----------------|
| `tb_fdu_delay_chain` | Random pulses are delayed by exactly `T_delay`. |
| `tb_fame_fdu` | 68 single glitches sweeping 16 ns down to about 5 ns in 162 ps steps, plus a double glitch. Alarm is checked every cycle against an edge-count model. 61 glitches below 15 ns, plus the double, give 62 alarms. |
| `tb_fame_fcu` | Directed and random alarm and completion sequences. |
| `tb_frr_pingpong` | Random data and freezes, and the C_b/C_f/C_a scenario. |
| `tb_fame_frr_bank` | Reads, restores and resume address against reference shadows. |
| `tb_fame_commit_guard` | Random combinations of all inputs. |

`tb_fame_top` runs the whole design at its default parameters. It wraps the
design in a behavioural 7-stage pipeline model:

- The model runs a 3600-instruction program of dependent register operations,
  flag updates and stores.
- It injects the same 68-glitch sweep. Every third fault gets a second glitch
  while the handler runs, at each handler position in turn.
- In a glitched cycle, the model corrupts the X-stage result, the address
  entering X, and the register and flag writes committed at the cycle's end.
- The handler above runs through the pipeline.

The testbench checks:

- alarm and trap timing;
- the `%l1` value;
- dropped writes;
- the mode transitions;
- at the end, that the register file and flags equal a fault-free sequential
  run.

It also requires that every mechanism occurred at least once: alarm, a glitch
that was too long to flag, entry to safe mode, restart, exit, dropped
register, flag and data-cache writes, RDASR, and restores from both shadows.

What is not verified:

- a real processor;
- gate-level timing of the delay chain against a real critical path;
- faults other than clock glitches;
- recovery of faulty data written to the data cache in C_f. That data is only
  discarded by the handler's flush; memory-fault recovery is outside this
  design.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fame_pkg.sv tb/tb_fame_top.sv \
          --top-module tb_fame_top -Mdir obj_top
./obj_top/Vtb_fame_top
```

For another testbench, replace the testbench file and top module. `--timing`
is required, because the clocks and the delay chain use delays. The top-level
run takes well under a second.

## Choices made here that a user may want to revisit

- **Delay-chain length.** `T_DELAY_NS = 15` and `N_BUF = 15` are set for a
  16 ns clock.
- **Flags width.** The flags are 4 bits (SPARC N, Z, V, C).
- **Restores.** A restore also rewrites the flags, and restores are accepted
  only in safe mode.
- **%asr20/21 bit layout.** The layout shown in the table above is this
  design's own.
- **Resume address.** The hardware writes the valid shadow's address into
  `%l1`, so the handler does not need to pick it.
- **FCU hardening.** The FCU is not hardened beyond its small size. Its mode
  register is a single flip-flop. Triplicating it is a natural next step if the
  FCU itself is a target.
- **Other fault sources.** There is a single detector, the clock monitor. The
  FDU is meant to combine several detectors, such as voltage, laser and
  electromagnetic sensors, or error-detecting codes. To add one, combine its
  alarm into `alarm` before the FCU.
- **Reset.** Everything resets asynchronously to nominal mode, with empty
  shadows. The first update after reset goes to shadow 0.
