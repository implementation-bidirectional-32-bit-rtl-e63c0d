# Two-exchange time-division switch, 2 × 16 subscribers

This is a digital telephone-style exchange pair. There are two exchanges of 16 subscribers
each. Any subscriber can send a 16-bit payload, plus its own number, to any idle subscriber of
its own exchange (an *intra-exchange* call) or of the other exchange (an *inter-exchange* call).

The switch is a classic **time-division, sequential-write / random-read** switch. It does not
wire an inlet to an outlet. Instead it works in repeating frames of two phases:

1. **Scan.** It copies every inlet into a data memory, in inlet order.
2. **Deliver.** It walks the outlets in order. Each outlet reads back the memory location of the
   inlet that called it.

A control memory, filled while the inlets are scanned, records which inlet feeds which outlet.
A caller-ID memory carries the caller's number along, so that the called subscriber can see who
is calling.

Subscriber lines are serial. Each line carries one 32-bit word per frame, and a frame is 32
clocks long, so each line carries exactly one bit per clock. A shift register on every inlet
turns the serial word into a parallel one, and a shift register on every outlet turns it back.
The top module is `switching_system`. The switching core, `switching`, has parallel word ports
and can be used on its own.

The design is written in synthesizable SystemVerilog (IEEE 1800-2017). It follows a published
VHDL design of the same system. Where that description is silent, the choices made here are
listed in [Departures and choices](#departures-and-choices).

## The opcode word

Each subscriber line carries one 32-bit word, the *opcode*. Signalling and payload travel in
the same word (in-band signalling).

| bits  | field   | meaning |
|-------|---------|---------|
| 31    | `en`    | 1: the subscriber is active (calling); 0: idle |
| 30    | `inter` | 1: the called subscriber is in the other exchange; 0: in the same exchange |
| 29:26 | `dst`   | number of the called subscriber, 0–15 |
| 25:22 | `src`   | the caller's own number, which becomes its caller ID |
| 21:16 | —       | zero; ignored on input |
| 15:0  | `data`  | payload |

`switching_pkg::opcode_t` is this layout as a packed struct.

Example: `32'hD940AD01` decodes as en=1, inter=1, dst=6, src=5, data=`AD01`. It asks for the
payload `AD01` to go to subscriber 6 of the other exchange, marked as coming from number 5.

Note that `src` is a number the caller claims for itself. It is not the caller's line position.
The switch routes by line position, and it reports `src` as the caller ID.

## A frame, clock by clock

One frame takes `2 × 16 = 32` clocks. Both exchanges are handled in the same clocks. One
counter scans inlet *i* of both exchanges at once, and a second counter serves outlet *j* of
both exchanges at once.

**Scan phase: slots 0–15, ingate counter = i.** For each exchange *e*, the word on inlet *i*:

- goes to data-memory location *i* of exchange *e*, as `{en, data}`, 17 bits;
- has its `src` field written to caller-ID location *i* of exchange *e*;
- becomes a **call request**, if `en` = 1. The called exchange is *e* when `inter` = 0 and the
  other exchange when `inter` = 1. The request is *connected* when both of these hold:
  - the called subscriber's own line has `en` = 0. Only an idle subscriber can be called.
  - no earlier caller has already taken that outlet in this frame.

  When it is connected, the called exchange's control memory stores `{valid, e, i}` at the
  called outlet's location. If both exchanges call the same free outlet in the same slot, the
  first exchange wins. Refused requests pulse `call_blocked[e]`; connected ones pulse
  `call_setup[e]`.

**Delivery phase: slots 0–15, outgate counter = j.** For each exchange *x*:

- Control-memory entry *j* of exchange *x* is read, then cleared. Each connection lasts exactly
  one frame; the next scan sets it up again from the lines.
- If the entry is valid, it gives the caller's exchange *s* and location *i*. Data-memory and
  caller-ID location *i* of exchange *s* are then read. This read is at a location chosen by
  the control memory, which is the "random read".
- Outlet *j* of exchange *x* is loaded with the **delivered word**:

  ```
  {en=1, inter=(s != x), dst=<caller's src number>, src=4'b0, 6'b0, data}
  ```

  If nobody called outlet *j*, it is loaded with all zeros instead. The caller number (or 0) is
  also stored in the destination half of the caller-ID memory and shown on
  `caller_id[x][j]`.

Because the data memory is written in the first half of the frame and read in the second, every
payload crosses the switch within the frame in which it was presented. The delivered words stay
on the outlets until the same slot of the next frame.

**Worked example.** First-exchange inlet 0 holds `32'hD940AD01`, and all other lines are idle.
During scan slot 0, outlet 6 of the second exchange gets the entry `{valid, ex 0, loc 0}`.
During delivery slot 6, the second exchange's outlet 6 becomes `32'hD400AD01`: en=1, inter=1,
caller number 5 in bits 29:26, and payload `AD01`. Its `caller_id` becomes 5.

With the first enabled clock after reset counted as clock 1, the outlet changes on clock 24:

- clock 1 leaves the idle state;
- clocks 2–17 are the scan;
- clock 18 + *j* is delivery slot *j*.

## Serial lines (top module `switching_system`)

The core's 32 enabled clocks per frame double as bit times. A modulo-32 bit-position counter
runs on those clocks. It counts position *p* = 0 at scan slot 0 up to 31 at delivery slot 15.

- **Inlets.** The subscriber presents bit 31−*p* of its word during position *p*. On every
  line, `sp_conv` shifts the bit in, MSB first. At the end of position 31 it copies the
  finished word into a holding register. That register feeds the core as `line_in` for the
  whole next frame, so the core scans a word that is stable.
- **Outlets.** At the end of position 0, each outlet's `ps_conv` loads the word the core
  delivered in the previous frame. It then shifts the word out MSB first:
  - bit 31 during position 1;
  - bit 31−(*p*−1) during position *p*;
  - bit 0 during position 0 of the following frame.

  The one-position offset exists because, at the end of position 31, the core is still
  writing outlet 15.
- **Sync outputs.** `rx_sync` is high during position 0 and `tx_sync` during position 1. These
  are the first bits of the incoming and outgoing words.
- **Latency.** A word sent in frame *k* is switched in frame *k*+1. Its result starts leaving
  on `tx` at position 1 of frame *k*+2.
- **Enable.** While `enable` is low, no bit moves in either direction.

`switching_system` has the same ports as `switching` (below), except for the lines. `line_in`
and `line_out` are replaced by `rx[2][16]` and `tx[2][16]` (one bit each), plus `rx_sync` and
`tx_sync`.

## Timing summary (core module `switching`)

| event | clock edge, counted from the first edge with `enable` high after reset |
|---|---|
| leave IDLE | 1 |
| scan slot *i* (inlet *i* sampled) | 2 + *i* |
| outlet *j* updated | 18 + *j* |
| `frame_done` high | after edge 33 |
| next frames | every 32 clocks, back to back |

- Reset is synchronous and active high. It clears all memories and outlets, and it puts the
  controller in IDLE.
- While `enable` is low, nothing advances: the phase, both counters, the memories and the
  outlets all hold. The frame continues where it stopped once `enable` returns.
- Inlet words are sampled at their scan slot. A called subscriber's idle status is sampled at
  its caller's scan slot. Lines should therefore be held steady for the scan half of a frame.

## Ports of the core `switching`

| port | dir | type | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst` | in | 1 | synchronous reset, active high |
| `enable` | in | 1 | run (1) / hold (0) |
| `line_in[e][u]` | in | `opcode_t` [2][16] | word on subscriber *u* of exchange *e* (0 = first, 1 = second) |
| `line_out[e][u]` | out | `opcode_t` [2][16] | word delivered to that subscriber |
| `caller_id[e][u]` | out | 4 bits [2][16] | number of the subscriber calling it this frame (0 if none) |
| `phase` | out | `phase_t` | `PH_IDLE`, `PH_SCAN`, `PH_DELIVER` |
| `frame_done` | out | 1 | one-clock pulse at the end of each frame |
| `call_setup[e]` | out | 1 [2] | the inlet of exchange *e* scanned this clock was connected |
| `call_blocked[e]` | out | 1 [2] | an active inlet of exchange *e* scanned this clock was refused |

## Blocks

All are in `rtl/`, one module per file.

| file | block | role |
|---|---|---|
| `switching_pkg.sv` | package | opcode, memory-entry and phase types; `make_delivered()` |
| `switching_system.sv` | top | serial lines: 32 `sp_conv`, the core, 32 `ps_conv`, bit-position counter |
| `switching.sv` | switching core | two exchanges, both counters, call-request routing, delivery word |
| `sp_conv.sv` | serial-to-parallel | per inlet: 32-bit shift register, MSB first, plus holding register |
| `ps_conv.sv` | parallel-to-serial | per outlet: 32-bit load/shift register, MSB first |
| `switch_ctrl.sv` | frame controller | IDLE → SCAN (16) ⇄ DELIVER (16); enable gating; `frame_done` |
| `mod_counter.sv` | modular counter | modulo-16 slot counter; one on the ingate side, one on the outgate side |
| `ingate.sv` | ingate | 16:1 selection of the scanned inlet word (one per exchange) |
| `data_memory.sv` | data memory | 16 × 17 bits per exchange; one sequential write port, two random read ports |
| `control_memory.sv` | control memory | 16 entries per exchange, one per outlet; two write ports (one per calling exchange) with busy check and priority; read-and-clear port |
| `callerid_memory.sv` | caller-ID memory | 16 source + 16 destination numbers per exchange |
| `outgate.sv` | outgate | one held 32-bit register per outlet, written by slot |

Per exchange there is one ingate, one data memory, one control memory, one caller-ID memory
and one outgate. The frame controller and the two counters are shared.

**Why the memories have two ports.** Both exchanges are scanned and served in the same clock.
So a control memory can receive a request from its own exchange (intra) and from the other
exchange (inter) in the same clock. Likewise, a data memory can be read by both exchanges'
outlets in the same clock.

Synthesis estimate for the core: about 1.2 k flip-flop bits, most of them the 2 × 16 × 32
outlet registers, and 864 memory bits. The serial top adds about 3 k flip-flop bits, in the 64
shift registers and the 32 holding registers.

## Departures and choices

These points follow the published description:

- the opcode layout;
- two exchanges of 16 subscribers;
- a 16-clock scan of all 32 subscribers;
- sequential write / random read, with a control memory that holds, per outlet, the address of
  the inlet feeding it;
- the memory sizes: data memory 16 × 17, control memory 16 entries, caller-ID memory 32
  locations;
- the rule that a call needs an active caller and an idle called subscriber;
- intra or inter routing by bit 30;
- synchronous operation with reset and enable;
- the example words `D940AD01` → `D400AD01`.

These are this design's own choices, or resolve conflicting statements:

- **Caller ID position.** The caller's number appears in bits 29:26 of the delivered word, and
  bits 25:22 are zero. This reproduces the published simulation result (`D400AD01`). A prose
  statement that the called user reads the caller from bits 25:22 does not match that result.
- **Enable bit.** Bit 31 is the enable bit, as given by the opcode layout. A single mention of
  "bit 16" as the enable does not fit the published example, where bit 16 is 0 and the call
  succeeds.
- **Separate lines in each direction.** Each subscriber has an input word and an output word.
  The original uses bidirectional lines, where the delivered word overwrites the called line.
  Here the delivered word is a fresh word; it is not a merge with the called line's other bits.
- **One frame per connection.** Unused outlets get zeros each frame. Connections are rebuilt
  every frame.
- **Contention.** A busy outlet refuses later callers. In a same-slot tie, the first exchange
  wins. The original does not say how contention is handled.
- **The 17th data-memory bit** holds the caller's enable bit.
- **Where the call data comes from.** The control memory is filled straight from the scanned
  opcode's `dst`/`inter` fields. There is no separate processor port into it.
- **No MAR/MDR register stages.** The memory address and data registers of the classic
  structure are not separate registers here. The counters and control-memory outputs address
  the memories directly, with combinational reads.
- **Serial framing.** Bit order (MSB first), one word per line per frame, the sync outputs and
  the two-frame latency are this design's own. The converters sit one per line, outside the
  inlet and outlet gates, where the classic structure draws one shared converter between gate
  and memory. Placing them this way keeps the published 16-clock scan of whole words. The
  original's own simulation drives whole parallel words; the `switching` core keeps that
  interface.

No timing or area figures of the original FPGA implementation are reproduced or compared.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops itself through a watchdog.

| testbench | what it checks |
|---|---|
| `tb_switching_system` | serial top, default size. Sends 16 frames of words on all 32 `rx` lines: the two published examples, refusal cases and random frames, with `enable` dropped for 6 clocks mid-frame. It checks every word on every `tx` line two frames later against a reference model, and checks `rx_sync`/`tx_sync` at every clock. It counts each mechanism and fails if any never happened. |
| `tb_switching` | core, end to end, at default size. Published inter-exchange example: word and delivery clock. Published intra-exchange example. Calls from the second exchange. Refusal of a call to an active subscriber. Busy refusal, in different slots and in the same slot. Idle caller. Enable held low mid-frame. 40 random frames against a reference model. It counts each mechanism and fails if any never happened. |
| `tb_switch_ctrl` | phase sequence, frame length, `frame_done`, enable hold, reset |
| `tb_mod_counter` | modulo-16 and modulo-5 counting with random enable and clear |
| `tb_sp_conv`, `tb_ps_conv` | random words in and out, MSB first, with idle clocks that must hold |
| `tb_ingate`, `tb_data_memory`, `tb_control_memory`, `tb_callerid_memory`, `tb_outgate` | random traffic against reference models; directed busy, tie and clear cases for the control memory |

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/switching_pkg.sv tb/tb_switching.sv --top-module tb_switching -o sim
./obj_dir/sim
```

Replace `tb_switching` with any other testbench name, such as `tb_switching_system`. Each
testbench runs in well under a second.

## Changing it

- **Subscribers per exchange.** The subscriber count is fixed at 16 by the 4-bit number fields
  of the opcode. `N_USERS` and `ID_W` in `switching_pkg` must change together, and the opcode
  struct with them. The blocks themselves are parameterized by `N`.
- **Payload width.** This is `DATA_W` in the package. The opcode's spare bits 21:16 set how far
  it can grow without changing the 32-bit word.
- **Delivered word.** Its format lives in one place, `switching_pkg::make_delivered()`.
- **Contention policy.** This lives in `control_memory`, in the `wr_ok` logic.
