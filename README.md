# BStoA — a burst interface from a clocked sender to a self-timed receiver

A clocked circuit (the *sender*, LS) has to hand a burst of 2^n words to a
self-timed, bundled-data circuit (the *receiver*, LA). A plain
request/acknowledge interface has to run one full handshake per word. A FIFO
needs a controller and full/empty logic for every stage. BStoA instead
transfers the whole burst in **one handshake on each side**. It has one
controller on the self-timed side. It has only as many sender registers as
the difference between the two cycle times requires.

Both cycle times are fixed when the interface is built:

* `SCT` is the sender's clock period.
* `ACT` is the receiver's handshake cycle: the time from one word being
  taken to the next one being taken.

From those two numbers and the burst length, the interface picks its
structure and its number of registers at elaboration time.

```
          clocked side (clk)                         self-timed side
 LS  ──sreq──►┌──────────────────┐   req_0   ┌──────────────────────────────┐
     ──sdata─►│ Sfsm + Scount    │──────────►│ sd_0_0 ─┐                    │
     ◄─sack───│ Sreg_0..num_r-1  │══ words ═►│         XOR─► Click ─► lclk_0 ─┼─► Areg ─adata─► LA
              │ A1 ─ A2 ─ XOR    │◄──────────│ nreq_0 ─sd_0_1─┘  │ phase ──────┼─► areq ───────► LA
              └──────────────────┘   ack_0   │ Acount, ack_0 FF ◄┘  ◄── aack ──┼── LA
                                   (via hd_0)│ num_r:1 mux ─► Areg            │
                                             └──────────────────────────────┘
```

## The two variants

**Sender not faster than the receiver (`SCT >= ACT`).** Every word can be
taken before the next one arrives. One sender register is enough. The sender
FSM toggles the internal two-phase request `req_0` once per word. The
self-timed controller fires once per toggle and copies the word into `Areg`.
Latency from `sreq` to the last word:

    L = 2^n * SCT + ACT

**Sender faster than the receiver (`SCT < ACT`).** Words arrive faster than
they can be taken, so two things change.

1. *Words must be held longer than one clock cycle.* Word `j` is written to
   `Sreg_(j mod num_r)`. It stays there for `num_r` clock cycles, which gives
   the receiver time to reach it. The number of registers is

       L     = SCT + 2^n * ACT
       WT    = L - 2^n * SCT          (how long the receiver lags the sender)
       num_r = min(2^n, ceil(WT / ACT))

   For SCT = 15 ns and ACT = 17 ns this gives 2, 3 and 5 registers for
   bursts of 8, 16 and 32. A `num_r`-input multiplexer picks the register
   that the receiver reads next.

2. *The request must not run ahead of the controller.* If `req_0` toggled
   once per word, a new toggle could reach the Click Element while it was
   still firing for the previous word. The local clock would then glitch or
   a firing would be lost. So the sender toggles `req_0` **once per burst**.
   The self-timed side makes the other 2^n − 1 requests itself:
   - a flip-flop toggles `nreq_0` on every `lclk_0` except the burst's last;
   - `nreq_0` passes through the delay `sd_0_1`;
   - the Click Element's request is `req_0 XOR nreq_0_delayed`.

   After each firing, the request input therefore differs from the Click
   phase again once `sd_0_1` has passed. The next firing also waits for the
   receiver's acknowledge, so firings come every
   `max(sd_0_1, LA's acknowledge time)` = ACT. When the last word is taken,
   `nreq_0` stays put and the controller comes to rest. The phase arithmetic
   works out so that the next `req_0` toggle starts the next burst.

In both variants a counter `Acount` counts the firings. On the 2^n-th firing
a flip-flop toggles `ack_0`. This signal goes back to the clocked side
through the hold delay `hd_0` and a two-flop synchronizer (`A1`, `A2`). An
XOR gate turns the transition into an end-of-burst event.

## Handshakes at the two ports

**Sender side (four-phase, clocked by `clk`):**

1. LS raises `sreq` and presents word 0. It then presents one word on every
   following cycle, 2^n words in all, and keeps `sreq` high.
2. `sack` rises on the edge that takes the last word, exactly 2^n clock
   cycles after `sreq` rose.
3. LS lowers `sreq`.
4. `sack` falls on the edge after both of these have happened:
   - the end-of-burst event has arrived;
   - `sreq` is low.

   Only then is a new burst accepted.

**Receiver side (two-phase bundled data):**

- Each transition of `areq` offers one word on `adata`.
- LA answers with a transition of `aack`.
- No word is offered before the previous one has been acknowledged: `aack`
  is the "next stage acknowledge" input of the Click Element.

## Timing constraints and the delay elements

Correct operation rests on three delays. In silicon or on an FPGA they are
chains of cells sized by static timing. Here they are the behavioural module
`delay_element`, an inertial delay with a parameter:

| element  | parameter | role | requirement |
|----------|-----------|------|-------------|
| `sd_0_0` | `SD00_PS` (2 ns) | delays `req_0` so that the `Sreg_k` word is settled at `Areg` when `lclk_0` rises | min control delay > max data delay + margin + setup |
| `sd_0_1` | `SD01_PS` (= `SCT_PS`) | delays `nreq_0`, so that the next firing sees the next word | `SCT <= sd_0_1 < ACT` (checked at elaboration) |
| `hd_0`   | `HD0_PS` (1 ns) | delays `ack_0` towards the synchronizer | data held long enough after capture; `num_r` registers give `num_r*SCT` of hold slack |

`ACT` is a promise about the receiver, not something the interface measures.
If LA acknowledges more slowly than `ACT_PS`, a register is overwritten
before it is read. The same happens when the register bank is smaller than
the rule above asks for: capped at two registers, the end-to-end test loses
words in its 16- and 32-word configurations.

The RTL has no gate delays, so the Click Element's local-clock pulse has
zero width in simulation. It still clocks every register on its rising edge
in Verilator. The setup and hold inequalities are properties of a placed
netlist and are not checked here. Only the bound on `sd_0_1` is checked.

## Parameters (top module `bstoa`)

| parameter | default | meaning |
|-----------|---------|---------|
| `DATA_W`    | 32    | word width (a choice of this implementation) |
| `BURST_LEN` | 8     | 2^n words per burst; must be a power of two |
| `SCT_PS`    | 15000 | sender clock period, ps |
| `ACT_PS`    | 17000 | receiver handshake cycle, ps |
| `SD00_PS`, `SD01_PS`, `HD0_PS` | 2000, `SCT_PS`, 1000 | delay elements, ps |

These are derived, not set directly:

- the variant (`bstoa_pkg::calc_mode`);
- `NUM_R` (`bstoa_pkg::calc_num_r`).

The defaults are burst 8, SCT 15 ns and ACT 17 ns. This is one of the six
configurations the design was evaluated in (bursts of 8/16/32 with ACT
13/17 ns), and it uses the register bank (`NUM_R` = 2). To run a 16- or
32-word burst in one handshake, set `BURST_LEN`. To build the
one-register variant, set `ACT_PS` to at most `SCT_PS`.

## Files

| file | contents |
|------|----------|
| `rtl/bstoa_pkg.sv` | mode type; functions for the variant, the latency L and `num_r` |
| `rtl/bstoa.sv` | top: derives the variant and `NUM_R`, connects the two halves |
| `rtl/sync_interface.sv` | clocked half: `sfsm`, `sreg_bank`, `sync_2ff` |
| `rtl/sfsm.sv` | sender FSM with burst counter Scount, `req_0`, `sack`, XOR edge detector |
| `rtl/sreg_bank.sv` | `Sreg_0..NUM_R-1`, written in turn |
| `rtl/sync_2ff.sv` | two-flop synchronizer A1/A2 |
| `rtl/async_interface.sv` | self-timed half: controller, `nreq_0`, Acount, `ack_0`, multiplexer, `Areg` |
| `rtl/click_element.sv` | two-phase Click Element (one flip-flop plus firing logic) |
| `rtl/delay_element.sv` | behavioural delay line (not synthesizable logic: it has no logic function) |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_bstoa_full` |
| `tb/ls_model.sv`, `tb/la_model.sv`, `tb/bstoa_env.sv` | sender model, receiver model, one test environment per configuration |
| `tb/la_click_pipeline.sv` | receiver built as a Click-Element pipeline with sd/hd delays |

Synthesis tools see `delay_element` as a plain wire. For a real
implementation, replace it with a chain of cells, kept from being
optimised away, sized from static timing.

## Simulating

Every file carries `` `timescale 1ns/1ps ``. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bstoa_pkg.sv tb/tb_bstoa.sv \
          --top-module tb_bstoa -o sim && ./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_bstoa` with any other testbench in `tb/`. Each testbench ends
with `TB_RESULT checks=N failures=M`.

- **`tb_bstoa`** runs all six evaluated configurations side by side (bursts
  of 8, 16 and 32; SCT 15 ns; ACT 13 and 17 ns), four random bursts each.
  For every word it checks data and order. For every burst it checks:
  - `sack` rises exactly 2^n cycles after `sreq`;
  - the last word is acknowledged exactly `L + sd_0_0` after `sreq`, with L
    from the formulas above;
  - `sack` falls only after delivery.

  It also fails if any mechanism was never used: self re-arming through
  `nreq_0`, one request per word, register-index wrap inside a burst, and
  `sack` waiting for `sreq` to fall.
- **`tb_bstoa_full`** runs the top at its default parameters.
- **`tb_bstoa_pipeline`** replaces the abstract receiver with a three-stage
  bundled-data pipeline of Click Elements (`tb/la_click_pipeline.sv`). The
  receiver's cycle then comes from its own delays: sd 12 ns + hd 5 ns =
  17 ns. The test checks that the words come out of the far end of the
  pipeline, and that inside a burst `areq` moves every ACT (sender faster)
  or every SCT (sender slower).
- The unit testbenches check each block on its own. For example,
  `tb_async_interface` checks the time of every `areq` transition in both
  variants, and `tb_sync_interface` checks that `sack` falls on the third
  edge after `ack_0` changes.

Each testbench was also run against a deliberately broken copy of its
module, and each one failed. For the top, the broken copy has too few
sender registers for bursts of 16 and 32, and words are lost.

## Choices made where the design leaves freedom

- **Word width:** 32 bits.
- **Reset:** active-low and asynchronous; everything is cleared.
- **Delay values:** as in the table above.
- **Sfsm:** its states (idle, receiving, waiting) and the rule that `sack`
  falls only after both the end-of-burst event and `sreq` low.
- **Multiplexer select:** made by a separate counter that steps modulo
  `num_r` and is cleared at the end of each burst.
- **Stopping the burst:** `nreq_0` does not toggle on the burst's last
  firing, which gives exactly 2^n firings.
- **Structure selection:** the two variants are one parameterised module,
  selected by comparing `SCT_PS` with `ACT_PS`.
- **Counter widths:** Scount and Acount are log2(burst length) bits wide.
- **Multiplexer/XOR on the `sack` path:** the multiplexer that drives
  `sack` is folded into Sfsm's state decoding. The XOR that detects the
  `ack_0` transition is kept as a gate.

## Not included

- The FIFO-based interface that the design was compared against.
- The sender and receiver circuits themselves: the testbenches model them.
- The area, power and energy figures, which come from FPGA synthesis and
  gate-level power analysis.
- Any timing closure of the delay elements.
