# Prime-bank parallel memory with a Linear Permutation Network

Array processors fetch *linear sections* of arrays: rows, columns, diagonals,
any run of addresses `v0, v0+k, v0+2k, ...` with a fixed separation `k`. To read
`P` such elements in one memory cycle they must sit in `P` different banks, and
each must then be steered to the processor that asked for it.

With a power-of-two number of banks, every even separation piles elements
into fewer banks. With a **prime** number of banks `M`, an address `A` lives
in bank `A mod M`. Then any separation that is not a multiple of `M` spreads
`M` consecutive elements over all `M` banks. This RTL builds the two pieces
that make a prime bank count practical:

* **Cheap bank selection.** For `M = 2^m - 1` (31, 127, ...) the remainder
  `A mod M` is the sum of the `m`-bit digits of `A`. A small tree of
  one's-complement adders computes it. The word inside the bank is just the
  low `n - m` address bits. This pair of residues identifies every bank word
  exactly once, so no memory is wasted.
* **A non-blocking alignment network.** For a section with separation `k`
  (`a = k mod M`) and start bank `b`, processor `i` needs bank `a*i + b mod M`.
  The *Linear Permutation Network* (LPN) performs exactly the permutations of
  that form. It uses two barrel shifters and fixed wiring, so it needs
  `O(M log M)` switches and has `O(log M)` latency. It is pipelined, and no
  two messages ever meet.

The top level, `prime_memory_system`, connects 31 processor lanes to 31
external banks at its defaults. It uses 40-bit addresses, so each bank holds
2^35 words. It accepts section commands and moves one full superword of 31
elements per clock.

## Addresses as residues

An address is held as the pair `(A mod M, A mod 2^(n-m))`:

| field  | width (default)  | meaning |
|--------|------------------|---------|
| bank   | `clog2(M)` (5)   | `A mod M`, which bank |
| offset | `n - m` (35)     | low `n-m` bits of `A`, the word in that bank |

The two moduli are coprime, so the pair is unique for every address below
`M * 2^(n-m)`. That is the usable address space: `2^n (1 - 2^-m)` words for
`M = 2^m - 1`. Sums and differences of addresses are formed residue by residue, with no
carry between the two fields. `rns_addr_add` also flags a zero result.
Each processor lane (`lane_agu`) converts its first address and its
separation once. After that it only adds.

**Remainder modulo `2^m - 1`** (`mod_mersenne`, `oca`). `2^m` is congruent
to 1 modulo `M`, so `A mod M` equals the sum of the radix-`2^m` digits of `A`,
taken modulo `M`. Addition modulo `2^m - 1` is one's-complement addition: the
carry out of the top bit is added back in at the bottom. A 40-bit address
has eight 5-bit digits. Four one's-complement adders (OCAs) add them in pairs,
then two, then one: 7 adders on 3 levels. The tree can produce all ones,
which also means zero, so the output folds it to 0.

**Remainder modulo `2^m + 1`** (`mod_fermat`). Here `2^m` is congruent to
-1, so digits at odd positions are subtracted. Each odd digit is replaced by
`M - d`, and the digits are summed in a tree of modulo-`M` adders. Use `W = 4`
for 17 banks and `W = 8` for 257. Set `PLUS_ONE = 1` on `addr_convert` and the
modules above it to select this form. The bank count `M` is always derived
from `W` and `PLUS_ONE`.

## The Linear Permutation Network

**Why it works.** For a prime `M`, the non-zero residues `1..M-1` form a cyclic
group under multiplication, and a generator `g` reaches all of them as
`g^0, g^1, ..., g^(M-2)`. Write every non-zero input number as a power of
`g`. Multiplying by `a = g^j` then just adds `j` to the exponent. Adding to an
exponent, modulo `M-1`, is a rotation. So the multiplication is done by a
barrel shifter.

The network has three parts (`lpn`):

1. **Multiply by `a`.** Input 0 goes straight through (0·a = 0). Input `g^k`
   enters position `k` of an `(M-1)`-element circular barrel shifter, which
   rotates by `j` = log_g(a).
2. **Re-order.** Fixed wiring: shifter position `k` drives line `g^k mod M`,
   and line 0 comes from the bypass. The lines are now in natural order
   0..M-1.
3. **Add `b`.** An `M`-element circular barrel shifter rotates by `b`.

Example with `M = 7`, `g = 3`. The powers are 3^0..3^5 = 1, 3, 2, 6, 4, 5, so
the first shifter sees the inputs in the order 1, 3, 2, 6, 4, 5. Take `a = 3`
(`j = 1`) and `b = 2`:

| input `i`      | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|----------------|---|---|---|---|---|---|---|
| `3i + 2 mod 7` | 2 | 5 | 1 | 4 | 0 | 3 | 6 |

Input 3 shows how a message gets there. Input 3 is `g^1`, so it enters
position 1 and is rotated to position 2. It leaves the wiring on line
`g^2 = 2`, and the last shifter moves it to `2 + 2 = 4`.

**Barrel shifter** (`barrel_shifter`). There are `ceil(log2 N)` stages. Stage
`s` moves an element `2^s` places around the ring when bit `s` of that
element's shift amount is set. The stages still compose to any rotation when
`N` is not a power of two.

**Routing tags.** Control is distributed. Each message carries its two shift
amounts (`j`, `b`) as routing tags, and each stage reads its own bit of the
tag. Giving all messages in a cycle the same tags is the same as central
control, and no two messages can collide. If tags ever differ, a collision is
reported on `conflict`. Because tags travel with the data, successive cycles
may use different settings. A new section can therefore start while the
previous one is still in the pipeline.

**Timing.** There is a register after every shifter stage. The input-0
bypass has the same number of registers as the first shifter, so all lines
stay aligned. One-way latency is `ceil(log2(M-1)) + ceil(log2 M)` cycles:
6 for `M = 7` and 10 for `M = 31`. A new set of `M` messages can enter every
cycle.

**Return path** (`lpn_rev`). Read data travel from banks to processors
through a mirrored network: rotate down by `b`, undo the wiring, then rotate
down by `j`. With the same tags it exactly undoes `lpn`.

**Tables.** `pms_pkg` computes `g^k mod M`, the discrete logarithm, and
checks that `M` is prime and `g` is a generator. Both run at elaboration, so
the wiring and the `logmod_rom` table follow from `M` and `G` alone. An
invalid `M`/`G` pair stops elaboration with an error.

## Accessing a section

`section_ctrl` turns a command `(start v0, separation k, length l, write?)`
into per-lane requests.

* **Superwords.** Element `e` of the section goes to lane `e mod P`. Lane `i`
  is loaded with `v0 + i*k` and steps by `P*k`. Each cycle issues one
  superword: `P` elements, or fewer for the last one.
* **Network setting.** `k` passes through the remainder unit and the log
  table once per section, which gives `j`. The third shift `b` is the bank of
  lane 0's current element. With `P = M`, `b` stays fixed for the section.
  With fewer lanes than banks (`P < M`), `b` changes from superword to
  superword, so sections are effectively cut into pieces of length `P`.
* **Single-bank sections.** If `k mod M = 0`, every element lies in the same
  bank and no permutation can spread them. The controller then issues one
  lane per cycle. Lane `c` is steered with `j = 0` (multiply by 1) and
  `b = bank - c mod M`, and `seq_mode` is high.

A command is accepted when `cmd_valid` and `cmd_ready` are both high. One
cycle loads the lanes. Then one superword is issued per cycle, or one
element per cycle in sequential mode. `cmd_ready` returns in the cycle after
the last issue.

* **Held lanes.** A processor that is not ready raises its `proc_hold` bit.
  With `P = M` the network setting is fixed for the whole section, so only
  that lane waits and the others keep going; lanes then reach the banks out
  of lockstep, and a cycle can mix elements of different superwords without
  any two meeting in one bank. With `P < M`, or in sequential mode, `b`
  depends on the superword, so a hold on any active lane stalls the whole
  superword (or the single element) for that cycle.

## Tags formed by each processor

A central controller is the natural fit for SIMD operation, but because the
tags travel with the messages, each processor can also form its own. Set
`DIST_TAGS = 1` on the top to give every lane a `lane_tag_unit`. When a
section command is accepted, lane `i` feeds the separation through its own
remainder unit and log table. It registers `j = log_g(a mod M)` and the line
`pos = a*i mod M` that the first subnetwork delivers it to. `pos` is read from
a table of powers of `g` at `j + log_g(i)`, so no multiplier is needed. For
each element, the third shift is then `b = bank - pos mod M`, so the element
lands in its own bank. For `a mod M = 0` the unit takes `a = 1`, which gives
the same steering as the controller's sequential mode.

The routes are identical to those of the central controller; only the place
where the tags are formed changes. The default is `DIST_TAGS = 0`, which
builds no per-lane tag hardware.

## Top-level interface (`prime_memory_system`)

| group | signals | notes |
|-------|---------|-------|
| command | `cmd_valid`, `cmd_ready`, `cmd_write`, `cmd_start[ADDR_W]`, `cmd_stride[ADDR_W]`, `cmd_len[LEN_W]`, `seq_mode` | length 0 is ignored |
| processor hold | `proc_hold[P]` | lane `i` issues nothing while its bit is high (see "Held lanes") |
| processors (`P` lanes) | `proc_req`, `proc_elem`, `proc_wdata` | while `proc_req[i]` is high, lane `i` handles element `proc_elem[i]`; on a write it takes `proc_wdata[i]` in the same cycle |
| read return | `proc_rvalid`, `proc_rdata`, `proc_relem` | on the lane that issued the read, `2*(ceil(log2(M-1))+ceil(log2 M)) + MEM_LAT` cycles later (21 at the defaults) |
| banks (`M` ports) | `bank_req`, `bank_we`, `bank_addr[ADDR_W-W]`, `bank_wdata`, `bank_rdata` | the banks are outside this RTL; read data are expected `MEM_LAT` cycles after the request |
| status | `route_error` | a request reached a bank other than its own, or two messages met; never seen in tests |

Parameters: `ADDR_W = 40`, `W = 5` (so `M = 31`), `PLUS_ONE = 0`, `G = 3`,
`P = 31`, `DATA_W = 32`, `LEN_W = 16`, `MEM_LAT = 1`, `DIST_TAGS = 0`. Reset is asynchronous
and active low. Only valid bits and control state are reset.

Usage rules:

* Every address of a section must lie below `2^ADDR_W`. Residue addresses
  wrap modulo `M * 2^(ADDR_W-W)`, not modulo `2^ADDR_W`, so a section that
  runs past the top does not wrap the way binary addresses would.
* The banks must accept one request per cycle. There is no back-pressure.

## Modules

| file | role |
|------|------|
| `pms_pkg.sv` | elaboration-time number theory (powers, logarithms, prime and generator checks) |
| `oca.sv` | one's-complement adder |
| `mod_mersenne.sv` | `A mod (2^W-1)` by a digit-sum tree of OCAs |
| `mod_add.sv`, `mod_fermat.sv` | modulo-`M` adder; `A mod (2^W+1)` by an alternating digit sum |
| `addr_convert.sv` | binary address to (bank, offset) |
| `rns_addr_add.sv` | residue address addition and subtraction, zero test |
| `lane_agu.sv` | per-lane address generator |
| `barrel_shifter.sv` | pipelined, tag-controlled circular shifter |
| `logmod_rom.sv` | discrete-log table |
| `lpn.sv`, `lpn_rev.sv` | the forward and return Linear Permutation Networks |
| `section_ctrl.sv` | section controller |
| `lane_tag_unit.sv` | per-processor routing tags (distributed control) |
| `prime_memory_system.sv` | top level |

## Choices made here, and what is not included

The digit-sum remainder trees, the three-part network and its tag control,
the log table, and the sequential fallback for `k mod M = 0` come from the
source design. It also supplies the defaults: 31 banks, 40-bit addresses,
and generator 3 (shown there for a 7-port network). The following are this
implementation's own choices:

* data width, command and processor interfaces, and reset behaviour;
* pipeline registers after every stage, and the memory-latency hold of the
  routing tags on the return path;
* the exact handling of the special cases: `b` taken per superword, and
  steering single-bank sections with `j = 0`;
* the `conflict` and `route_error` reports;
* how a processor forms its own third tag (`b = bank - a*i`), and the table
  of powers used for `a*i`;
* the circuit of the `2^m + 1` remainder unit.

The source suggests delaying the network's input 0 by `log M - 1` stages.
Here the delay is the depth of the first shifter, `ceil(log2(M-1))`, which is
what keeps the lines aligned with this pipelining. The return direction uses
a second, mirrored network rather than a bidirectional one.

Not included:

* The memory banks themselves (ordinary RAM).
* The radix-`M` and mixed-radix address representations, an alternative to
  residues in which the bank is the low digit of the address written in base
  `M`.
* Remainder units for primes not of the form `2^m ± 1`.
* Fully independent (MIMD) use, where processors access unrelated
  addresses. Per-processor tags are built (`DIST_TAGS = 1`), but the lanes
  still run one common section, and the network reports rather than
  resolves collisions between unrelated requests.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one compares against values it computes independently and prints
`TB_RESULT checks=N failures=F`. The main runs are:

* the OCA over all 5-bit operand pairs;
* remainder trees against `%` for thousands of random 40-bit addresses;
* both network directions at `M = 7` and `M = 31`, with a new random
  permutation every cycle and partly filled inputs, checking the exact
  latency, plus a combinational (`PIPE = 0`) 7-port network checked within
  the cycle;
* the controller at `P = M = 7` and `P = 5`, with random held lanes,
  checking every issued address and bank, and that lane `i` goes to bank
  `a*i + b mod M` under the issued routing tags (so no two lanes of a cycle
  share a bank).

`tb_prime_memory_system` runs the full-size system (no parameter overrides)
against sparse behavioural banks (`tb/memory_bank_model.sv`). It writes and
reads rows, columns, diagonals, single-bank sections, high addresses and 40
random sections back to back. It checks that:

* every write lands at bank `A mod 31`, word `A mod 2^35`;
* every read returns the last data written, on the right lane, exactly 21
  cycles after issue.

It also requires that short superwords, sequential sections, and
overlapping sections with different routing all occurred. Random
`proc_hold` bits are applied throughout, and the test requires cycles in
which lanes of different superwords reached the banks together.
`tb_prime_memory_system_small` repeats this with 17 banks (`2^4 + 1`),
24-bit addresses and 12 processors. That setup exercises the alternating-sum
remainder and a third shift that changes per superword.

`tb_prime_memory_system_dist` runs the same checks with `DIST_TAGS = 1`
(31 banks, 31 processors, 24-bit addresses). `tb_lane_tag_unit` checks
every lane's tags at 31 and 17 banks against `a*i + b = bank`.

To simulate with Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/pms_pkg.sv tb/tb_prime_memory_system.sv \
          --top-module tb_prime_memory_system -Mdir obj_pms
./obj_pms/Vtb_prime_memory_system
```

Use the same pattern for any other testbench. The full-size build takes
about 40 s, and the simulation runs in well under a second. The tests pass
with registers initialised to random values.
