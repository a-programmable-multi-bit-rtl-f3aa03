# FISH — programmable multi-bit fault injection

FISH (Fault Injection Self-test Hardware) injects single- and multi-bit upsets
into a running digital circuit. It does not touch the circuit's flip-flops or
memories. Instead it places small *fault injection elements* on chosen nets,
its interconnect. Each element is a scan flip-flop plus a mux. The elements
of one target are linked into a serial *chain*. A controller shifts a
pseudo-random bit pattern into the chain, then raises one global
**FI Enable**. While FI Enable is high, every net whose element holds a 1 is
inverted. Lowering FI Enable restores the circuit at once. Nothing has to be
reloaded, because no state was corrupted; only what the net's loads saw was.

The pattern comes from four 8-bit LFSRs with programmable feedback taps. A
*step control* caps how many ones, and so how many bit upsets, one pattern
may carry. Afterwards the chain is shifted out into a serial-in parallel-out
register. The controller counts the ones there and classes the event as no
fault, a single-bit upset (SBU) or a multi-bit upset (MBU).

This repository holds synthesizable SystemVerilog for the whole injector. It
also holds five small target circuits, each wired to one chain, and
self-checking testbenches for every module.

This RTL follows the architecture published as *"A programmable
multi-bit fault injection for embedded system"*. That description gives the
block diagram, the LFSR structure, the fault injection element and the timing
in clocks. It leaves most widths, encodings and the controller's insides
open. The section [Where this design chooses](#where-this-design-chooses)
lists what was filled in.

## Block structure

```
                 cfg, start                                  status
                     |                                          ^
              +------v------------------------------------------+----+
              |  fi_server (Fault Injection Server, FSM)             |
              |    fi_seq_gen: 4 x prog_lfsr -> 32-bit word          |
              |                byte serializer -> seq_steps_ctrl mux |
              +--+-----------+-----------+-----------+-------^-------+
        FI Enable|   FI Input|   FE shift|  chain_sel|       | 8-bit read-back
              +--v-----------v-----------v---+       |   +---+---+
              |        fi_switch_in          |       |   | sipo  |
              +--+------+------+------+------+       |   +---^---+
                 |      |      |      |      |       |       |
        chain 0  v  1   v  2   v  3   v  4   v       |   +---+----------+
        tgt_and_array tgt_counter tgt_bubble_sort    +-->| fi_switch_out|
        tgt_adder4    tgt_mult4  (each: 8 x fi_element)  +---^----------+
                 |      |      |      |      |               |
                 +------+------+------+------+-- scan_out ---+
```

| Module | Role |
|---|---|
| `fish_pkg` | Constants, the `fsi_cfg_t` / `fsi_status_t` structs, phase and fault-class enums |
| `fish_top` | The whole injector with its five instrumented targets |
| `fi_server` | Controller; contains the sequence generator |
| `fi_seq_gen` | Four LFSRs, 32-bit word, byte serializer, output mux |
| `prog_lfsr` | 8-bit LFSR with programmable taps r1..r7 and serial seed entry |
| `seq_steps_ctrl` | Counts the upsets sent and masks the rest |
| `fi_element` | One scan flip-flop plus an invert-or-pass mux on one net |
| `fi_chain` | `CHAIN_LEN` elements in series |
| `fi_switch_in` / `fi_switch_out` | Route control to the selected chain and its output to the SIPO |
| `sipo` | Read-back register |
| `tgt_*` | Target circuits, each carrying one chain of eight elements |

## One injection, clock by clock

`fi_server` latches `cfg` when `start` is high in IDLE. Then it runs:

| Phase | Clocks | What happens |
|---|---|---|
| INIT | 10 | Clocks 0–7 step all four LFSRs. With `cfg.reseed = 1`, each LFSR takes its seed serially, MSB first. Otherwise it advances eight feedback steps, so all eight of its bits are new. Clock 8 captures the 32-bit word and loads byte `cfg.lane` into the serializer. Clock 9 clears the upset count. |
| WRITE | 8 | The byte is shifted into chain `cfg.chain_sel`, MSB first, through the step-control mux. Afterwards element *j* holds bit *j* of the masked byte. |
| INJECT | `cfg.inject_cycles` (0 counts as 1) | FI Enable is high. Each net whose element holds 1 is inverted. |
| READBACK | 8 | The chain is shifted with 0 at its input. What leaves it enters the SIPO, and the chain ends empty. |
| CLASSIFY | 1 | The ones in the SIPO are counted. `status.readback`, `ones` and `fclass` are set, the counters are updated, and `done` pulses. |

INIT plus WRITE is **18 clocks** from the start of INIT to the first clock of
FI Enable. This is the injection time the published design quotes: a
10-clock initialisation plus an 8-clock write for eight elements. A complete
injection, read-back included, takes 18 + `inject_cycles` + 9 clocks plus
one idle clock before the next `start` is taken. At the 100 MHz the source
mentions, 18 clocks is 180 ns.

`status.phase` shows the phase at all times. The fault is present on the
target's nets exactly during INJECT. In WRITE and READBACK the chain moves,
but FI Enable is low, so the nets are clean.

## The fault pattern: LFSRs, word and step control

This is the least obvious part of the design.

**LFSR (`prog_lfsr`).** There are eight stages s0..s7. Each step shifts them
one place towards s7, and s7 is the serial output. The new s0 is one of two
values:
- while Init En is high, the serial seed bit;
- otherwise the feedback u = ⊕ r_j·s_j for j = 1..7.

Each tap r_j selects whether s_j enters the XOR chain. A tap vector written
r7..r1 corresponds to a feedback polynomial as follows:

| r7..r1 | polynomial |
|---|---|
| 1100000 | x⁷ + x⁶ + 1 |
| 0110000 | x⁶ + x⁵ + 1 |
| 0010100 | x⁵ + x³ + 1 |
| 0001100 | x⁴ + x³ + 1 |
| 0000110 | x³ + x² + 1 |
| 0000011 | x² + x + 1 |

A seed sent MSB first leaves s_j equal to seed bit *j*. An all-zero state
stays zero, so give every LFSR a non-zero seed. The register is always eight
stages long, so these polynomials are not maximal-length for it. For example,
x⁷ + x⁶ + 1 cycles through 63 states, not 255. If that matters, choose the
taps accordingly.

**Word and lane.** `word[8k+7:8k]` is LFSR *k*'s state, s7 in the top bit.
A chain has eight elements, so one injection uses one byte, chosen by
`cfg.lane`. `status.word` shows the whole word.

**Step control (`seq_steps_ctrl`).** While the byte is shifted out MSB first,
a counter counts the ones actually sent. Once the count equals
`cfg.upset_limit`, the output mux switches to its constant-0 input. The
pattern therefore holds at most `upset_limit` ones. These are the ones
nearest the MSB of the random byte.
- Limits 1, 2, 3 and 4 give SBUs and 2-, 3- and 4-bit MBUs, provided the
  random byte has that many ones. Otherwise the pattern has fewer.
- Limit 0 gives a clean run.
- A limit of 8 or more passes the byte unchanged.

Example: the byte is `1011_0110` and the limit is 2. The bits sent are
`1 0 1 0 0 0 0 0`, so elements 7 and 5 flip their nets.

The generator is biased towards high bit positions. With a limit of 1, the
surviving upset is always the highest one in the byte. `tb_mbu_stats` measures
this over one million sequences with x⁷ + x⁶ + 1: bit 7 is hit in about 51 %
of them, bit 6 in 25 %, and so on. The published design reports a nearly even
spread over positions, with about 23 % of values fault-free. This RTL does not
reproduce that table. The masking rule behind it is not described closely
enough to rebuild.

## Fault injection elements and the five targets

`fi_element` computes `sig_out = (fi_enable & q) ? ~sig_in : sig_in`. Its
flip-flop `q` loads `scan_in` when the chain's shift enable is high. In the
published design the chain has its own FE Clock. Here every flip-flop runs on
the single system clock, and FE Clock is a clock enable.

Five chains are built, eight elements each:

| Chain | Target | Nets carrying elements (element j →) |
|---|---|---|
| 0 | `tgt_and_array`: c = a & b, 8 gates | c[j] |
| 1 | `tgt_counter`: 8-bit up-counter with enable | counter output q[j]; the counter's own flip-flops are never faulted |
| 2 | `tgt_bubble_sort`: four 2-bit values, ascending | output bit j (= bit j%2 of value j/2) |
| 3 | `tgt_adder4`: 4-bit ripple-carry adder | j even: sum bit j/2; j odd: carry out of bit (j−1)/2, before the next stage uses it |
| 4 | `tgt_mult4`: 4×4 unsigned multiplier | product bit j |

In the adder the elements sit on internal carries. A single flipped carry
therefore changes higher sum bits too, not just one output bit. This shows
the difference between faulting interconnect and faulting outputs.

## Read-back and classification

The SIPO shifts new bits in at bit 0. After eight read-back shifts,
`status.readback[j]` is what element *j* held during INJECT. `status.ones` is
its population count. `status.fclass` is `FC_NONE` (0 ones), `FC_SBU` (1) or
`FC_MBU` (≥ 2). `status.n_injections` and `status.n_mbu` count completed
injections and the MBUs among them. Both are 16-bit and wrap.

## Configuration and status reference

`fsi_cfg_t` (latched at `start`):

| Field | Width | Meaning |
|---|---|---|
| `taps[k]` | 4 × 7 | r7..r1 of LFSR k |
| `seeds[k]` | 4 × 8 | seed of LFSR k, used when `reseed` = 1 |
| `reseed` | 1 | 1: load seeds in INIT; 0: advance eight steps |
| `upset_limit` | 4 | maximum number of upsets in the pattern |
| `lane` | 2 | which LFSR byte is used |
| `chain_sel` | 3 | target chain, 0–4; a larger value reaches no chain (an assertion flags it) |
| `inject_cycles` | 8 | clocks FI Enable stays high |

`fsi_status_t`: `phase`, `busy`, `done` (one-clock pulse), `readback`,
`ones`, `fclass`, `word`, `n_injections`, `n_mbu`.

There is one clock and an active-low asynchronous reset, which clears all
state (LFSRs to zero). `start` is ignored while busy. Two assertions in
`fi_server` check the rules: FI Enable is never high while a chain shifts,
and a start names an existing chain.

## Where this design chooses

These points follow the published design:
- the four 8-bit LFSRs with programmable taps and serial seed entry;
- the 32-bit word;
- a step-control mux between the word's bit and 0;
- the chain of elements, each a flip-flop plus an invert/pass mux gated by
  FI Enable AND the stored bit;
- switch logic selecting a chain;
- SIPO read-back classified by its number of ones;
- eight elements per chain;
- 10 + 8 clocks to injection.

These are choices made here, where the description is silent:
- **Controller insides:** what the 10 INIT clocks do, the INJECT length, the
  read-back that also clears the chain, and the three fault classes.
- **Step control:** limits by counting ones sent, keeping the first ones from
  the MSB.
- **Word to chain:** one byte per injection, chosen by `lane`, sent MSB first.
- **FE Clock:** a clock enable, not a second clock.
- **Reset values** and all field widths.
- **Number of chains and the targets:** the source shows chains A…N. It names
  the counter, bubble sort, 4-bit adder and 4-bit multiplier as workloads, and
  shows elements at AND-gate outputs. Their sizes and the nets instrumented
  are chosen here.

Not built:
- the OR1200 processor that the source uses for its resource figures;
- the TMR arrangement mentioned around the AND gates;
- stuck-at fault models (only bit flips are injected);
- the "adaptive injection rate", which is not described;
- the FPGA board and configuration memory.

The millisecond injection times the source tabulates cannot be related to
clock counts. Only the 18-clock figure is reproduced.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each ends
with `TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
          rtl/fish_pkg.sv tb/tb_fish_top.sv --top-module tb_fish_top
./obj_dir/Vtb_fish_top
```

Substitute any other testbench name to run it.

- **`tb_fish_top`** runs 250 injections over all five chains at the default
  sizes. It checks every target output on every clock against a fault-free
  reference with the expected pattern applied during INJECT. It checks the
  18-clock latency, the read-back and the counters. It also counts each
  mechanism and fails if one never happened: reseed, free run, masking, exact
  1/2/3/4-bit upsets, each class, each chain, carry ripple and multi-clock
  enable.
- **`tb_fi_server`** uses a behavioural chain and checks every phase length.
- **`tb_mbu_stats`** is the fault-position histogram described above, about
  10 s of simulation.
- The leaf testbenches (`tb_prog_lfsr`, `tb_seq_steps_ctrl`, `tb_fi_seq_gen`,
  `tb_fi_element`, `tb_fi_chain`, `tb_fi_switch_*`, `tb_sipo`, `tb_tgt_*`)
  compare against models written independently in the testbench.

To instrument another circuit, give it a `fi_chain` (or individual
`fi_element`s) on the nets to be faulted. Then add a port to `fi_switch_in` /
`fi_switch_out` by widening `N_CHAINS`, and wire it in `fish_top`. For chains
longer than eight, `CHAIN_LEN` in `fish_pkg` sets the write and read-back
lengths and the SIPO width. The generator then still supplies eight random
bits per injection (`SEQ_LEN`), so the serializer would need widening too.

Size after generic synthesis of `fish_top`: about 410 word-level cells and
268 flip-flops. Of these, 40 flip-flops are in the five chains and about 200
are in the server with its generator.
