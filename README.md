# Parity Product Code link for networks-on-chip

Soft errors on on-chip wires and buffers are rare, but a network-on-chip has a
great many of them. A full SECDED or Hamming code on every flit costs 6–8 extra
bits per 32 data bits, plus the wider FIFOs that go with them. This design
protects a link with **one parity bit per flit** and **one parity flit per
group of flits**, a Parity Product Code (PPC). It recovers the rare cases that
parity alone cannot handle by asking the sender again, in a targeted way:

* **Detect.** Each flit carries `p`, the XOR of its N data bits. The
  receiver's check `C_F` is 1 when an odd number of bits flipped.
* **Locate and correct.** Each group of flits is followed by the parity flit
  `F_P`, the XOR of all flits in the group. At the receiver,
  `C_P = F_0 ^ … ^ F_{M-1} ^ F_P` is 1 at every bit index where an odd number
  of flits changed. If exactly one flit fails `C_F` and exactly one bit of
  `C_P` is set, the upset lies where they cross. The **Mask** flips that bit
  as the flit is read out, so no retransmission is needed.
* **Ask again, selectively.** Some patterns cannot be located this way, for
  example two flips in the same flit, which leave `C_F = 0`. The receiver then
  asks for **rows**: for each bit index set in `C_P`, bit b of every flit in
  the group. If flits are flagged, it asks for **columns**, meaning those
  flits. As a last resort it asks for the **whole group** (go-back-N). Both
  ends hold the group in a *transposable FIFO*, which can be read and
  written by flit or by bit index.
* **Adapt.** At low error rates even one parity flit per group is wasted
  bandwidth. A small controller moves between three modes:
  1. **Mode-1:** adaptive `F_P` with an overflowing packet check.
  2. **Mode-2:** plain PPC.
  3. **Mode-3:** high error rate, where the system is informed.

  In Mode-1 the parity flit covers a window of M flits, and M doubles after
  every clean window, up to 64.

Each hop along the way also checks `C_F` and asks its upstream neighbour to
repeat a failing word once. This is a hybrid ARQ that removes upsets that
happened on the wire. Upsets that were already stored in a buffer survive
the repeat, and they are left to the end-to-end code.

## Block diagram

```
            TX (ppc_tx)                                  RX (ppc_rx)
 src ──► T-FIFO (K×N) ─► mux ─► FLIT PAR ─┬─► out ──► hop ──► FLIT PAR ─► T-FIFO (K×(N+1)) ─► Mask ─► sink
          ▲ row read ─┘                   │      (ppc_hop:          │        ▲ row/col write
          │                     PACK.PAR ◄┘       PAR check,        └──► PACK.PAR (C_P) ──► controller
          │                     + Reg (F_P)       ARQ, FIFO)                                   │
          └───────────── feedback: ACK / COL / ROW / GOBACK / FPREQ ◄──────────────────────────┘
                                      mode, M ◄── ppc_mode_ctrl ◄── eval, cf_sum, cp_sum
```

| File | Block |
|---|---|
| `rtl/ppc_pkg.sv` | shared types: word kinds, feedback kinds, modes |
| `rtl/ppc_flit_par.sv` | per-flit parity encoder / checker (`p`, `C_F`) |
| `rtl/ppc_pack_par.sv` | packet parity register (`F_P`, `C_P`) |
| `rtl/ppc_tfifo.sv` | transposable FIFO, flip-flop based |
| `rtl/ppc_mask.sv` | single-bit correction on read-out |
| `rtl/ppc_hop.sv` | one router hop: parity check, link ARQ, FIFO |
| `rtl/ppc_mode_ctrl.sv` | adaptive mode / window controller |
| `rtl/ppc_tx.sv` | transmitter: T-FIFO, encoder, controller |
| `rtl/ppc_rx.sv` | receiver: decoder, T-FIFO, controller, Mask |
| `rtl/ppc_top.sv` | TX → `HOPS` hops → RX with the mode controller |

## Code words on the link

Every word is N+1 bits, with the parity bit `p` at bit N. A 2-bit side band
(`flit_kind_e`) tells the three kinds of word apart:

| kind | bits [N-1:0] |
|---|---|
| `FK_DATA` | the flit's data |
| `FK_PARITY` | `F_P`. All N+1 bits are the XOR of the covered code words, so bit N is the XOR of their `p` bits. |
| `FK_ROW` | the answer to a row request for bit index b: `[K-1:0]` holds bit b of flits 0…K-1, `[K]` holds bit b of `F_P`, and the bits from 16 up hold b when the word is wide enough (N ≥ 22 at the default size). Narrower links leave the index out; both ends then go through the requested rows lowest index first. Bit N is this word's own parity. |

Index b = N stands for the column of parity bits. The transmitter stores only
the N data bits, so it recomputes those parity bits.

Every link uses the same handshake. A word moves when
`valid && ready && !arq`. `arq` is raised in the same cycle by a receiver whose
parity check fails. The sender must then keep the same word on the link and
offer it again. Each checker refuses a word at most `RETRIES` times (default
1). After that it accepts the word, and the receiver keeps that flit flagged.

## How the receiver decides (the hard part)

The receiver writes each data flit of a group into its T-FIFO, with the
parity bit. It folds each flit into PACK. PAR, and then folds in `F_P`, so the
register then holds `C_P`. The `C_F` flags are recomputed from the stored
flits. Each time the receiver takes a decision, it counts the flags
(`nflags`) and the set bits of `C_P` (`ncp`).

**Mode-2 and Mode-3.** `F_P` follows every group of K flits. The receiver
takes the first matching row:

| condition | action |
|---|---|
| `nflags = 0`, `ncp = 0` | deliver |
| `nflags = 1`, `ncp = 1` | deliver. Mask flips the located bit. |
| `nflags = 0`, `ncp > 0`, row not tried | `FB_ROW`, argument `C_P`. Each answer row is written across the FIFO. |
| `nflags > 0`, column not tried | `FB_COL`, argument is the mask of flagged flits. The answers overwrite those flits. |
| go-back not tried | `FB_GOBACK`. The FIFO is emptied and the whole group and `F_P` come again. |
| otherwise | deliver as is and pulse `ev_uncorrectable` |

After each row or column rewrite, `C_P` is updated by the change the rewrite
made: the old value XOR the new one. The table is then applied again. A row
answer also carries `pb`, bit b of `F_P`, so a damaged parity flit is repaired
the same way. Each stage is tried at most once per group, so a group always
ends.

**Mode-1.** `F_P` is sent only at the end of a window of M flits, where M is
a multiple of K. The transmitter still caches only K flits.

| situation | action |
|---|---|
| group inside the window, no flag | deliver at once; no `F_P` is spent |
| group inside the window, flagged | `FB_FPREQ`. The transmitter sends the XOR of the window so far. One located bit is masked. Anything else rewinds the window. |
| end of window (`F_P` arrives) | clean: deliver. One located bit: mask. Otherwise rewind the window. |
| rewind | Send `FB_GOBACK` and drop the group. Pulse `snk_rollback` with the number of flits of this window already delivered. At the transmitter, `src_rewind` asks the source to replay the whole window. |

Masking inside a window works because all earlier groups in the window were
clean. After the correction, the register restarts from `F_P`, which is what
the corrected sum of the window so far must equal.

The mode controller receives `eval` together with `cf_sum` and `cp_sum`, each
counted as 0, 1 or 2+. In Mode-2/3, `eval` comes at the first decision of a
group. In Mode-1 it comes at the end of a window or at a rewind. The rules
are:

| mode | result | next |
|---|---|---|
| Mode-1 | clean | M doubles, up to `M_MAX` |
| Mode-1 | any error | M halves. Reaching M ≤ K sets M = K and returns to Mode-2. |
| Mode-2 | clean | Mode-1 |
| Mode-2 | 2+ errors of either kind | Mode-3 |
| Mode-3 | at most one of each kind | Mode-2 |
| Mode-3 | more | `high_err` for one cycle, meaning the system should be told |

Both ends take the mode and M at the start of a window. The controller only
changes them before the receiver acknowledges, so both ends always agree.

## Timing

* The transmitter fills its T-FIFO completely, then sends one word per cycle:
  K data words, then `F_P` when it is due.
* The receiver takes one decision cycle after the last word. It then delivers
  the group at one flit per cycle, with the sink's `ready` as back-pressure.
  For a clean group, the first flit appears 2 cycles after `F_P` was
  accepted.
* The `ACK` after the last delivered flit releases the transmitter's cached
  group.
* Each hop adds one cycle.
* All feedback is a one-cycle pulse on a direct side band, and reset is
  synchronous, active low.
* Groups are sent stop-and-wait: the next group is filled only after the
  acknowledgement. This keeps the cached group available for every kind of
  ARQ, at the cost of link utilisation.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 32 | data bits per flit. Must be ≥ K+1, so that a row answer fits in one word. |
| `K` | 4 | flits per group = T-FIFO depth. At most 16. |
| `M_MAX` | 64 | largest Mode-1 window |
| `HOP_DEPTH` | 4 | hop FIFO entries |
| `RETRIES` | 1 | link-level repeats before a failing word is accepted |
| `HOPS` | 1 | hops chained between transmitter and receiver |

The 32-bit width, the 4-entry FIFOs and the window sizes 8–64 are those of
the published scheme's implementation and evaluation. The hop depth and the
retry count are choices of this design, and so is the number of hops: the
scheme checks parity at every hop but draws a link with one.

## What follows the published scheme, and what is this design's own

**Follows the scheme:**

* the flit parity and parity flit equations
* location of a single upset by crossing `C_F` and `C_P`
* correction by flipping on read-out
* the row, column and go-back ARQ stages
* row answers that include the parity-flit bit
* the flip-flop transposable FIFO, 32 bits wide at TX and 33 at RX, 4 slots
* the adaptive parity flit, requested after a failed retry
* the overflowing packet check with a go-back of the window
* the three-mode controller with doubling and halving of M
* the block structure of transmitter, hop and receiver

**Choices of this design** (the scheme leaves them open):

* the handshakes and the word-kind side band
* the feedback encoding and the row-word layout
* the stop-and-wait group flow, with the transmitter holding the group until
  it is acknowledged
* one retry per link and per ARQ stage, and the order in which the stages
  are chosen
* the source-replay and sink-rollback interfaces for the Mode-1 go-back
  (the cache holds only K < M flits)
* starting in Mode-2 with M = K, and capping M at 64
* the exact points where `eval` is raised
* the upset-injection inputs `link0_flip` / `link1_flip` on `ppc_top`,
  which model the channel's soft errors in simulation and are tied to zero
  in use

**Not built:**

* the shadow-clock (Razor) correction at hops, which the scheme mentions and
  then drops
* the 8-transistor transposable SRAM that it suggests for larger FIFOs
* a network with routing: the top is one path of `HOPS` hops

**Known limits:**

* Four flips on the corners of a rectangle (bit a and bit c in flit i and in
  flit j) cancel in both checks and go undetected. This is inherent to PPC.
* In Mode-1, a flagged group whose errors cannot be located costs a replay of
  the whole window.
* `ev_uncorrectable` groups are delivered with their errors.

## Simulating

All testbenches check themselves and end with a line
`TB_RESULT checks=<n> failures=<n>`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ppc_pkg.sv tb/tb_ppc_top.sv \
          -y rtl --top-module tb_ppc_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_ppc_top` with any of the following:

| testbench | what it checks |
|---|---|
| `tb_ppc_flit_par` | parity and `C_F` against a bit count; single flips are detected and double flips are not |
| `tb_ppc_pack_par` | the running XOR, folding in `F_P` (which must give `C_P = 0`), clear |
| `tb_ppc_tfifo` | random push, pop, column and row reads and writes against an array model |
| `tb_ppc_mask` | random groups with one flipped bit come out corrected |
| `tb_ppc_hop` | transient and persistent upsets, ARQ counts, ordering, holding under refusal |
| `tb_ppc_mode_ctrl` | mode, M and `high_err` against a model of the rules |
| `tb_ppc_tx` | group, `F_P`, column, row, go-back and rewind answers, and the adaptive `F_P` value |
| `tb_ppc_rx` | every decision path in Mode-2 and Mode-1, the feedback arguments, the eval counts, rollback, and the clean-group latency |
| `tb_ppc_top` | the whole link at its default size (end to end) |
| `tb_ppc_coding_rate` | coding rate of the default link at BER 1e-3, 1e-4, 1e-5 |
| `tb_ppc_multihop` | 1, 2 and 4 hops: correct delivery, hop ARQs growing with the hop count, one cycle of latency per hop (add `-y tb`) |
| `tb_ppc_width_sweep` | coding rate at widths 8 to 120 and the same three BERs (add `-y tb`, since it uses `tb/ppc_rate_harness.sv`) |

`tb_ppc_top` sends 4000 flits in four phases:

1. a clean start, in which the window grows to 64
2. a low-error phase, with transient, persistent-single and persistent-double
   upsets on both wires
3. a burst, which drives the link into Mode-3
4. a clean tail

It checks that every flit delivered outside the burst is correct, and that
each mechanism happened at least once: hop ARQ, receiver ARQ, masking, row
ARQ, column ARQ, go-back in Mode-2 and in Mode-1, the `F_P` request, source
rewind, sink rollback, an uncorrectable group, `high_err`, the mode changes
2→1 and 2→3, reaching M = 64, and halving M. It finishes in well under a
second.

### Coding rate

`tb_ppc_coding_rate` and `tb_ppc_width_sweep` flip each bit of every word
offered on the first wire with a fixed probability. Half of the upsets are
transient, so the hop's ARQ repairs them. The other half are persistent, as
if stored in a buffer, so PPC has to deal with them. The coding rate is the
useful data bits delivered divided by every bit sent on the first wire,
retransmissions included. Both testbenches also check that every flit
outside a group reported uncorrectable arrives intact. Measured rates:

| N | parity N/(N+1) | static PPC, K=4 | BER 1e-3 | BER 1e-4 | BER 1e-5 |
|---|---|---|---|---|---|
| 8 | 0.889 | 0.711 | 0.854 | 0.873 | 0.874 |
| 16 | 0.941 | 0.753 | 0.891 | 0.923 | 0.926 |
| 32 | 0.970 | 0.776 | 0.863 | 0.925 | 0.954 |
| 64 | 0.985 | 0.788 | 0.730 | 0.956 | 0.967 |
| 120 | 0.992 | 0.793 | 0.632 | 0.938 | 0.974 |

These come from the sweep, with 3000 flits per point. The 12000-flit run at
N = 32 gives 0.846, 0.944 and 0.954.

At a low error rate the adaptive link comes close to plain parity, and it
stays well above static PPC. At 1e-3 the rate falls quickly as the flit
gets wider:
* At 32 bits it is still above Hamming (32/38 = 0.842) and SECDED
  (32/39 = 0.821).
* At 64 bits it drops below Hamming (64/71 = 0.901).

These are the trends the published scheme reports for its adaptive parity
flit. The upset model is this design's own, so only the trends, not the
exact values, can be compared.

### Several hops

A persistent upset on the first wire gets past the first hop after its one
retry. Every later hop then sees the same bad parity and retries once too.
`tb_ppc_multihop` uses BER 1e-3 and 3000 flits per run. One run gave
101, 161 and 196 hop ARQs for 1, 2 and 4 hops. No flit was delivered wrong.
The first clean flit arrives 13, 14 and 16 cycles after reset.
