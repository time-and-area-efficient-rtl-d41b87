# Two-comparator KMP string matching array

Intrusion detection needs to search every packet for many fixed "fingerprint"
strings at line rate. This RTL does it with a row of small, identical matching
units. Each unit holds one pattern and checks it with the Knuth-Morris-Pratt
(KMP) algorithm. The pattern and its precomputed jump table sit in a small
memory, so a unit can be given a new pattern by loading 16 words. Nothing has
to be re-synthesised.

Plain KMP compares one character per clock. After a mismatch it may compare
the same input character several more times, so its input rate varies. This
design adds a second comparator and a short input buffer. When characters
match, the unit consumes two per clock and gets ahead of the input. That
lead then covers the clocks lost to re-comparisons after a mismatch. The
result is that a unit takes one character every clock, whatever the pattern
or the input. The buffer needs only k/2 slots for a k-character pattern.

The architecture follows the FPGA'04 paper "Time and Area Efficient Pattern
Matching on FPGAs" (Baker and Prasanna). The RTL and the choices listed below
are this implementation's own.

## Files

| file | contents |
|---|---|
| `rtl/kmp_pkg.sv` | shared types: stream slot `beat_t`, pattern entry, configuration word |
| `rtl/kmp_step.sv` | the two comparators and the index-update logic of one comparison cycle (combinational) |
| `rtl/kmp_matcher.sv` | pattern index q, input index j, packet state; wraps `kmp_step` |
| `rtl/input_buffer.sv` | k/2-slot circular buffer; it is also the unit's delay line |
| `rtl/pattern_memory.sv` | K × {character, jump} memory loaded from the configuration chain |
| `rtl/kmp_unit.sv` | one matching unit: buffer, pattern memory and matcher |
| `rtl/cslow_buffer.sv`, `rtl/kmp_cslow_unit.sv` | pipelined unit: two patterns share one set of comparators |
| `rtl/kmp_array.sv` | top: a row of `N_UNITS` chained units, unpipelined or pipelined |
| `tb/` | self-checking testbenches, plus `kmp_tb_pkg.sv` (jump-table builder and reference search) |

Default parameters: `K = 16` pattern characters, `DEPTH = K/2 = 8` buffer
slots, `N_UNITS = 8`, `PIPELINED = 0`. Characters are 8 bits wide.

## The jump table

The pattern memory of each unit holds, for q = 1..K, the character P[q] and
the jump value next[q]. This is KMP's optimised failure function. If P[q]
does not match the current input character, the next comparison of that same
character is against P[next[q]]. A value of 0 means no prefix of the pattern
can end at this character. The character is then dropped and matching
restarts at P[1] with the next one.

For the Fibonacci string `abaababaa`, the worst case for KMP:

| q | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|
| P[q] | a | b | a | a | b | a | b | a | a |
| next[q] | 0 | 1 | 0 | 2 | 1 | 0 | 4 | 0 | 2 |

The hardware does not compute this table. The host computes it and loads it.
`compute_next` in `tb/kmp_tb_pkg.sv` is the standard algorithm:

    t = 0; next[1] = 0
    for j = 1 .. K-1:
        while t > 0 and P[j] != P[t]: t = next[t]
        t = t + 1
        next[j+1] = (P[j+1] == P[t]) ? next[t] : t

## One comparison cycle (`kmp_step`)

The matcher holds the pattern index q and the buffer read index j. Each clock
it reads the input characters T[j] and T[j+1] from the buffer. It reads
{P[q], next[q]} and {P[q+1], next[q+1]} from the pattern memory. Comparator
C1 checks T[j] = P[q] and C2 checks T[j+1] = P[q+1]. The table below gives
the update:

| C1 | C2 | new q | j advances by |
|---|---|---|---|
| 0 | – | next[q] | 0 |
| 0 | – | 1, when next[q] = 0 | 1 |
| 1 | 0 | next[q+1] | 1 (T[j] matched; T[j+1] is compared again) |
| 1 | 0 | 1, when next[q+1] = 0 | 2 |
| 1 | 1 | q + 2 | 2 |

The result of C2 is ignored when C1 fails. In these cases C2 is not used at
all, and C1 alone moves q and j forward by one:

- T[j+1] is not in the buffer yet.
- T[j] is the last character of its packet.
- q = K.

A complete match is P[K] matching, through C1 or through C2. It pulses
`match`, and matching then restarts at P[1] with the next character. As a
result, occurrences are reported without overlap. The first occurrence in a
packet is always found, but an occurrence that overlaps an earlier reported
one is not counted. When the last character of a packet is consumed, q
returns to 1. The unit then reports whether the packet held the pattern.

Idle stream slots (valid = 0) are skipped, two per clock. A packet's first
character is held while the pattern memory is being reloaded.

### Why k/2 slots are enough

The input writes one slot per clock. The matcher consumes 0, 1 or 2 slots per
clock. Consuming 0 is a *stall*: the same character is compared again after a
jump. Take a run of matches that reaches pattern position q and then fails.
The matches consume about two characters per clock. The stall clocks that
follow number at most about log_φ(q), where φ is the golden ratio; this is
the longest chain of jumps, and the Fibonacci pattern is where it happens. For
every q, the characters consumed over the run add up to at least the number
of clocks it took. The number of unread characters therefore cannot grow
without bound. The largest build-up is one chain of stalls, about
log_φ(k) ≈ 6 for k = 16, and that fits in k/2 = 8 slots.

The testbenches check this claim directly on two kinds of input. The first
kind is random patterns and texts. The second is adversarial texts: prefixes
of the Fibonacci pattern, each broken by a wrong character. Neither ever
raised `overflow`. When matching starts on an empty buffer, at most 3 of the
8 slots were ever occupied (2 of 16 for k = 32). When a packet arrives while
its pattern is still loading, the buffer starts out full. The same texts
then fill all k/2 slots but never overflow. Every unit finished every packet
within k/2 clocks of the packet's last character arriving.

The worst start is a buffer that is already full when matching begins. This
happens when a packet arrives while the pattern is still being loaded. A
dedicated test replays that case on the 16-character Fibonacci pattern,
`abaababaabaababa`, with all 8 slots filled. Its next table is
0 1 0 2 1 0 4 0 2 1 0 7 1 0 4 0. The characters consumed per clock are:

| input | consumed per clock |
|---|---|
| P[1..15], then a wrong character | 2 2 2 2 2 2 2 1 1 1 … |
| P[1..11], then a wrong character | 2 2 2 2 2 1 0 0 0 1 … |

In the first case, the wrong character meets P[16]. next[16] is 0, so it is
dropped at once. In the second case, C2 fails at P[12]. The same character
is then compared with P[7], P[4] and P[2], which gives three stall clocks.
It fails at P[1] too and is dropped. In both cases the buffer never
overflows, and each packet is finished within n + k/2 clocks.

## Buffer, delay line and match vector (`input_buffer`)

The buffer is a circular array of `DEPTH` slots. Its write pointer advances
every clock, so idle slots are written too. The slot being overwritten is the
oldest character, and it is registered onto `pkt_out`. The buffer is
therefore also the unit's fixed delay line. A character leaves a unit exactly
`DEPTH + 1` clocks after it entered. A character written in clock t can be
read in clocks t+1 to t+DEPTH. If the matcher has not consumed it by then,
`overflow` pulses; an assertion also checks this.

Every slot also carries a match vector with one bit per pattern in the row.
The upstream vector arrives with each packet's last character. When a unit
finishes a packet that contained its pattern, it ORs its bit into that last
character's slot. The character leaves the buffer only after it has been
consumed, so the bit is always set in time. A mark that lands in the same
clock as the eviction is forwarded to the output. At the end of the row,
`mvec_out` on a packet's last character lists every pattern that occurred in
that packet.

## Loading patterns (`pattern_memory`)

Configuration words are 18 bits: `{valid, first, char[7:0], jump[7:0]}`. The
16-bit payload is {character, jump}. Send them on `cfg_in`, one per clock:
K words for unit 0, then K for unit 1, and so on. Flag the very first word
`first`. Each unit keeps the first K words it sees after a `first` word. It
passes every later word on to its neighbour, one clock later, and flags the
first word it passes on. A row of p units therefore reloads in about p·K
clocks.

`ready` drops while a unit is being reloaded. A packet that reaches the unit
in that time waits in the buffer. A reload can therefore start just after a
packet has finished in a unit, and the next packet can follow up to K/2
clocks before the reload completes. Reloading a unit while it is still
inside a packet is not supported. The host must wait until the unit has
finished the previous packet.

## Pipelined unit (`kmp_cslow_unit`)

Most of the clock period of the unpipelined unit goes to the memory reads and
the comparisons. The rest goes to the index multiplexers. The pipelined unit
cuts the cycle in two:

- **S1**: read the buffer at the context's j, and its pattern memory at its q.
- **S2**: compare and update (`kmp_step`).

Two independent matcher *contexts* take turns through the two stages
(C-slowing). When `phase` = 0, context 0 is in S1 and context 1 is in S2.
When `phase` = 1, the roles swap. Each context has its own pattern memory,
q, j and packet state. The buffer, the comparators and the update logic are
shared.

Each context completes one comparison cycle every two clocks. The stream
therefore advances one slot every two clocks, written at the end of each
clock with `phase` = 1. A unit still takes one character per comparison
cycle, but checks it against two patterns.

Context 1 reads a slot one clock before a write may evict it. `cslow_buffer`
handles this case: a late mark for an evicted character goes into the output
register, which still holds that character. In the row, bits 2i and 2i+1 of
the match vector belong to unit i.

## The row (`kmp_array`, top)

`kmp_array` chains `N_UNITS` units. The packet stream, the match vector and
the configuration words each pass only to the next unit, so no signal fans
out across the whole row.

| port | meaning |
|---|---|
| `pkt_in` (`beat_t`: valid, last, ch) | one stream slot, taken at the end of each clock with `slot_take` high |
| `pkt_out`, `mvec_out` | stream after the row; match flags on each last character |
| `cfg_in`, `cfg_out` | configuration chain |
| `match`, `pkt_done`, `pkt_match`, `stall`, `dual`, `ready`, `overflow` | per-pattern event flags for monitoring |

With `PIPELINED = 0`, `slot_take` is always 1, and the row latency is
`N_UNITS·(DEPTH+1)` clocks. With `PIPELINED = 1`, the row holds
`2·N_UNITS` patterns. `slot_take` is high every other clock, and the latency
is `N_UNITS·(DEPTH+1)` slots.

Packets must arrive as contiguous bursts, one character per slot, with
`last` on the final character. Idle slots are allowed only between packets.

## Relation to the paper

These parts follow the paper:

- the two-comparator KMP unit, its update table and the use of KMP's
  optimised jump function;
- the k/2 input buffer;
- the linear array with three neighbour-to-neighbour chains (packet, match,
  pattern);
- the 16-bit pattern/jump load path, with daisy-chained loading that forwards
  once a memory is full;
- the C-slowed two-pattern unit;
- 8-bit characters and 16-character patterns.

These choices are this implementation's own:

- **Start-up.** The paper preloads the buffer before matching starts. This
  matcher starts on the first buffered character, and the k/2 slots serve as
  slack.
- **Interfaces.** The stream framing (valid/last), the `first`-flag load
  protocol, `ready` and the reload interlock.
- **Match reporting.** The match vector carried on last characters, and the
  non-overlapping restart after a match.
- **Idle slots.** Idle slots are written to the buffer and skipped by the
  matcher.
- **Pipelined unit.** Where the pipeline register sits, the phase
  convention, and the input rate of one slot per two clocks. The paper gives
  only the principle and the resulting throughput.
- **Row length.** 8 units; the paper does not give a number.
- **Jump table at the last position.** The paper's example run matches 15 of
  16 Fibonacci characters and then shows the read pointer stalling on the
  16th. With the optimised table used here, next[16] = 0. The failing
  character is therefore dropped without a stall. The longest stall for this
  pattern comes from a failure at P[12] (see above). The paper's
  `aaa…ab`-type patterns, whose plain failure function steps back one
  position at a time, also have next = 0 at every `a` here.
- **Reset.** Asynchronous, active-low.

Not provided:

- Patterns shorter than K: every unit matches exactly K characters.
- Jump-table generation in hardware: the paper leaves it to a host.
- The paper's FPGA timing results (221 MHz unpipelined, 285 MHz pipelined on
  a Virtex-II Pro), which cannot be reproduced from RTL alone.
- 32-character patterns are not the default build. Set `K = 32` (`DEPTH`
  follows as 16). A single unit and a row of 8 units are simulated at this
  size.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops. The
reference results are computed independently: the jump tables come from
`kmp_tb_pkg::compute_next`, and the expected matches come from a direct
search (`count_matches`).

| testbench | what it covers |
|---|---|
| `tb_input_buffer` | read ports, count, delay, marks, overflow flag |
| `tb_pattern_memory` | loading, forwarding with the `first` flag, `ready` |
| `tb_kmp_matcher` | every clock's q/j update against the table; per-packet match counts |
| `tb_kmp_unit` | one unit: Fibonacci worst case from an empty and from a full buffer, `aaa…ab`, random patterns, reload overlapping a packet |
| `tb_kmp_unit_k32` | the same tests on a unit built for 32-character patterns (16-slot buffer) |
| `tb_kmp_cslow_unit` | pipelined unit, two contexts |
| `tb_kmp_array` | default-size row (8 × 16-character patterns), end to end, including a full reload |
| `tb_kmp_array_piped` | pipelined row with 16 patterns |
| `tb_kmp_array_k32` | the row test with 32-character patterns (`K = 32`) |
| `tb_functional_sim` | one unit with a preloaded buffer: clock-by-clock consumption for a 15-of-16 near match and for a failure on the longest jump chain |

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/kmp_pkg.sv tb/kmp_tb_pkg.sv tb/tb_kmp_array.sv --top-module tb_kmp_array
    ./obj_dir/Vtb_kmp_array

Each testbench runs in well under a second.
