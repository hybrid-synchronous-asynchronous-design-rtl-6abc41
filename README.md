# Asynchronous-to-synchronous interface with release-time alignment

Some systems are synchronous as a whole but do part of their work in
asynchronous QDI (quasi-delay-insensitive) logic. A router in an on-chip
network is one example: it is idle most of the time and works in bursts. Such
a system often needs more than a safe clock-domain crossing. Every result must
reach the synchronous side in one exact clock cycle, the cycle in which a
global free-running timer has a given value. The hardware then stays
cycle-for-cycle equivalent to a fully synchronous system or to a
discrete-event software model, even though the asynchronous part's latency
varies.

This interface does that. Each asynchronous token carries N data bits and a
T-bit **Data Release Time Value (DRTV)**. The interface:

1. synchronizes the token to the clock,
2. compares its DRTV with the global timer,
3. releases the N data bits in the cycle where the two are equal.

Two ideas keep this cheap:

* **Only the validity is synchronized.** The channel carries a validity wire
  computed by a completion tree, and by construction that wire is the last
  signal of the channel to change. Synchronizing this one wire therefore
  synchronizes all the data bits. The buffer after the synchronizer is
  modified so that its outputs cannot change before the synchronized
  validity is high.
* **The neutral phase is not synchronized.** A four-phase handshake returns
  to neutral after every token. A two-flip-flop synchronizer would spend
  about two cycles on that return as well. Here the synchronizer flip-flops
  are instead cleared directly by a reset pulse, once the token has been
  taken.

The default configuration has N = 8 data bits, T = 5 timer bits, two
synchronizing flip-flops, and a clock delay line of 9 inverter pairs (396 ps).

## Token path

```
             data rails (N+T, dual rail)
 in ──► C-tree ──► input PCFB ─────────────────────────────► modified PCEHB ──► DRTV ──► comparator ◄── timer
 in_e ◄──────────    │ buf_v         ▲ sync_enable ◄────────── │  ▲                        │ match
                     ▼               │                         │  │ reg_enable             ▼
                  D-FF 1 ─► D-FF 2 ──┴─► data_v_sync ──────────┘  │          valid ─► AND(valid, match, CLK_delayed)
                  (cleared by NOR(sync_enable, CLK))              │                        │ register clock
                                                   data (N) ──────┼──────────────► synchronous register (dual-rail out)
                                                                  │                        │ cleared by NOR(CLK, CLK_delayed)
                                                                  └──── output PCFB ◄── C-tree
                                                                          │  ▲
                                                                   out, out_v  out_e
 CLK ──► global timer          CLK ──► delay line ──► CLK_delayed
```

| Stage | Module | Role |
|---|---|---|
| Input completion tree | `ctree` | Validity of the incoming dual-rail token |
| Input full buffer | `pcfb` (W = N+T) | Takes the token and releases the sender at once, before the token is synchronized |
| Validity synchronizer | `validity_sync`, `c2mos_dff` | One or two flip-flops on the validity wire, with a neutral-phase reset |
| Modified half buffer | `pcehb_sync` | Passes the token only after the synchronized validity is high; single-rail output; holds the token until it is released |
| Global timer | `global_timer` | Free-running T-bit counter on CLK |
| Comparator | `sync_comparator` | T XNORs into an AND: `match` |
| Delay line | `clk_delay` | CLK_delayed, late enough for the comparison to settle (behavioural model) |
| Register clock / reset | `sync_reg_ctrl` | Gated clock `valid & match & CLK_delayed`; reset `NOR(CLK, CLK_delayed)` |
| Synchronous register | `sync_register` | Captures the N data bits, converts to dual rail, and clears itself every cycle |
| Output full buffer | `pcfb` (W = N), `ctree` | Takes the released token and gives it to the receiver with a normal four-phase handshake |
| Top | `async_sync_interface` | Connects the above |

All channels are dual-rail. Each bit has a true rail and a false rail, and
both are low when the bit is neutral. An enable is high when its stage is
ready for a new token; it falls to acknowledge a token. Token layout on the
input: `in[N+T-1:N]` is the DRTV and `in[N-1:0]` is the data.

## One token, cycle by cycle (two synchronizing flip-flops)

* **Before edge 1.** The sender puts a token on `in_t/in_f`. The input PCFB
  copies it to its output and acknowledges the sender (`in_e` falls). The
  sender can then return to neutral and present its next token, while this
  token is still being synchronized. The PCFB's output validity `buf_v`
  rises at some arbitrary time.
* **Rising edge 1.** D-FF 1 samples `buf_v`.
* **Rising edge 2.** D-FF 2 raises `data_v_sync`. The modified PCEHB now
  evaluates, and its output rails become valid. From the same edge the timer
  holds its new value.
  * `valid` rises and the PCEHB's left enable, `sync_enable`, falls.
  * The input PCFB returns its output to neutral.
  * The comparator sees the DRTV and settles while CLK_delayed is still low.
* **CLK_delayed rises (396 ps later).**
  * *If `match` is high:* the gated clock `valid & match & CLK_delayed`
    rises and the synchronous register captures the data. The output PCFB
    takes it and shows it on `out_t/out_f`, `out_v`. Its left enable
    `reg_enable` falls, which lets the PCEHB reset.
  * *If `match` is low:* nothing happens. The token stays in the PCEHB, and
    `sync_enable` stays low. This blocks the next token at the input PCFB,
    which cannot deliver while its right enable is low. Each later cycle
    repeats the comparison with the new timer value.
* **CLK falls.**
  * With `sync_enable` low, `NOR(sync_enable, CLK)` pulses and clears both
    flip-flops, so the neutral phase costs no clock cycle.
  * If the token was released, the PCEHB returns to neutral, and
    `sync_enable` rises again, which ends the pulse.
  * When CLK_delayed falls, `NOR(CLK, CLK_delayed)` clears the synchronous
    register to the neutral state. That lets the output PCFB re-enable.
  * The input PCFB may present the next token at once.

The result is a data release in the cycle whose timer value equals the DRTV.
A token arriving in an idle interface reaches the PCEHB on the second rising
edge (first with `SYNC_STAGES = 1`). When tokens queue up, they leave at
most one every two cycles (every cycle with `SYNC_STAGES = 1`). A DRTV that
has already passed waits for the timer to wrap, 2^T cycles later. Equality,
not "greater or equal", is what decides a release.

### Why the second buffer is a half buffer

The modified PCEHB keeps its left handshake open until its right side has
taken the token. Suppose it were a full buffer. It would accept the next token
while the present one waits for its release time. That next token's
validity would already have been synchronized, but its data would sit at
the buffer's input for an unbounded time. It would then reach the comparator
at a moment unrelated to the clock. With the half buffer, a waiting token
blocks the path, and every token that reaches the comparator does so right
after a synchronizing clock edge.

### Why the register clock cannot glitch

The three inputs of the register's clock gate can only arrive in one order:

1. `valid`, after a clock edge;
2. `match`, settled before CLK_delayed rises;
3. `CLK_delayed`.

`valid` falls in the low clock phase, once the flip-flops are cleared. It
can rise again only after the next rising CLK edge, when CLK_delayed is
low. So the gated clock has at most one rising edge per cycle. The
comparator itself may glitch, but only while CLK_delayed is low.

## Timing requirements on the environment

* **Receiver.** A released token must be taken by the output PCFB before the
  synchronous register is cleared. That clear happens at the falling edge of
  CLK_delayed, in the same cycle as the release. A receiver that holds the
  previous token too long would lose the new one. The assertion
  `a_token_taken` in `async_sync_interface` reports it.
* **Delay line.** The delay from CLK to CLK_delayed must exceed the path from
  D-FF 2 through the PCEHB and the comparator. It must also stay well below
  half a clock period, so that the register reset pulse has room.
* **Reset.** `rst_n` (active low) puts every QDI gate and flip-flop into its
  neutral or ready state and the timer to zero. Hold it for at least one
  clock edge.

## How the QDI circuits are written

The asynchronous stages are written at the level of their production rules.
Every state-holding node (the precharged output rail of a buffer, an enable,
a C-element) is one `gc_element`: a latch that is set when the node's
pull-down condition holds, cleared when its pull-up condition holds, and
otherwise keeps its value. For example, the modified PCEHB output rail for bit
i is

```
r1[i]  set:  en & lv & l_t[i]        clear:  !en & !lv
```

and its control part is `valid = C-tree(r1 | r0)`, `l_e = !valid`,
`en = C(r_e, l_e)`. The PCFB uses the usual full-buffer rules, listed in the
header of `pcfb.sv`.

This gives a synthesizable, simulatable netlist that keeps the handshake
order of the circuits. Lint tools therefore report latches and combinational
loops in these modules; that is the intended asynchronous structure. All
gates have zero delay, so a whole handshake completes within one simulation
time step. The only timed element is the delay line `clk_delay`, a
behavioural model with `#` delays. A synthesis tool sees it as a plain
buffer; in silicon the delay has to come from the chosen cells.

The flip-flops `c2mos_dff` are edge-triggered models of C²MOS master-slave
flip-flops with a forced reset on the second latch. The transistor-level
alternatives (conditional or full combinational feedback) have the same
logic function.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `N` | 8 | top | data bits released (the original design leaves N open) |
| `T` | 5 | top | DRTV and timer bits (the 5-bit comparator of the original design) |
| `SYNC_STAGES` | 2 | top, `validity_sync` | 1 or 2 synchronizing flip-flops |
| `INV_PAIRS` | 9 | top, `clk_delay` | inverter pairs in the delay line |
| `PAIR_DELAY_PS` | 44 | top, `clk_delay` | delay of one pair, ps |

The defaults are collected in the package `async_sync_pkg`. Every file
carries `` `timescale 1ps/1ps ``.

## Departures from the original design and own choices

Following the original design:

* the block structure and the modified PCEHB rules;
* the validity synchronizer and its `NOR(sync_enable, CLK)` reset;
* the XNOR/AND comparator, the `AND(valid, match, CLK_delayed)` register
  clock, and the `NOR(CLK, CLK_delayed)` register reset;
* T = 5, the 9-pair delay line, and the throughputs.

Choices made here:

* **Width and format.** N = 8. Dual-rail encoding everywhere. The DRTV sits
  in the top bits of the token.
* **Buffer internals.** The internal rules of the two PCFBs, and the C-tree
  shape, follow the standard templates. The original design does not give
  them.
* **PCEHB validity.** A C-tree over the per-bit `r1 | r0` gives the PCEHB's
  multi-bit validity. The original shows one bit only.
* **False rail before the flip-flops.** The inverter that makes the false
  rail of the synchronous register is placed in front of the flip-flops
  (2N flip-flops). That way the reset state is the neutral all-zero state
  that the output C-tree needs.
* **Register reset pulse.** It lasts from the falling edge of CLK_delayed
  to the next rising edge of CLK. That is what a NOR of the two clocks
  gives, and it matches the description of a pulse covering most of the low
  clock phase. One sentence in the original describes the pulse as
  starting at the rising edge of CLK_delayed instead.
* **Timer placement.** The timer is inside the interface and its value is
  an output. In the high-level view of the original, the timer value comes
  from outside.
* **Reset.** One chip reset, `rst_n`, replaces the original's separate
  parallel and serial resets.
* **Timer counting.** The timer counts up by one per cycle and resets to
  zero.

Not built:

* power gating with `valid`;
* the optional single-rail conversion after the output buffer. A
  synchronous consumer simply uses `out_t`.
* the arbiter and QDI mutual-exclusion element. The original mentions
  them only as background for the opposite (synchronous-to-asynchronous)
  direction.

## Simulating

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/async_sync_pkg.sv tb/tb_async_sync_interface.sv \
    --top-module tb_async_sync_interface -o sim
./obj_dir/sim
```

| Testbench | What it shows |
|---|---|
| `tb_async_sync_interface` | Whole interface at its defaults; see the list below |
| `tb_async_sync_interface_1ff` | Same test with `SYNC_STAGES = 1`: 1-cycle latency, one token per cycle |
| `tb_pcfb` | Random four-phase traffic; left handshake completes while the receiver stalls |
| `tb_pcehb_sync` | No output before `lv`; holds the token until both `r_e` and `lv` are low |
| `tb_validity_sync` | Exact synchronization latency; reset only in the low phase with `sync_enable` low |
| `tb_ctree`, `tb_sync_comparator`, `tb_sync_reg_ctrl`, `tb_sync_register`, `tb_global_timer`, `tb_c2mos_dff`, `tb_clk_delay` | Each block against an independent reference |

`tb_async_sync_interface` checks that:

* data arrive complete and in order;
* every token appears in the cycle in which the timer equals its DRTV;
* the synchronization latency is SYNC_STAGES edges;
* a 10-token burst leaves at exactly one token per SYNC_STAGES cycles;
* a stale DRTV waits for the timer to wrap.

It also counts how often each mechanism occurs, and each must occur at least
once:

* a token held for its release time;
* a release;
* a flip-flop reset pulse;
* a register reset;
* back-pressure at the input;
* the early release of the sender by the input full buffer;
* a timer wrap.

## Limits of trust

All of this is verified in zero-delay simulation only. The simulation checks:

* the order of the handshakes;
* the logic function;
* the cycle of release;
* the throughput.

It does not check any of the following, which have to be shown by
transistor-level or timing analysis of a real implementation:

* metastability;
* the safety margins that the delay line and the reset pulses are meant to
  provide;
* the hazard-freedom of the gate-level circuits.
