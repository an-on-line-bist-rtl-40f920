# BISTAR RAM: a RAM that tests and repairs itself while in use

`bistar_ram` is a single-port synchronous RAM that keeps looking for faulty
words while the system uses it. When it finds one, it swaps it out for a
spare word. The user sees a plain RAM with N words of M bits and no change in
the access protocol. Inside, the array has N + K words. A small
content-addressable memory (CAM) of K lines sends any access to a faulty word
to one of the K spares. Repair works on single words ("cell-only"), not on
whole rows or columns, so each spare fixes exactly one bad word.

The test runs on-line and transparently. It tests one word at a time, the
*cell under test* c_x. Before testing, it moves c_x into a spare, so user
accesses go to the spare and the real cell is free to be overwritten with test
patterns. Afterwards the word is copied back, or left re-mapped for good if it
failed. The scheme follows the published BISTAR architecture (built-in
self-test and repair). The choices this RTL adds are listed under
"Departures and open points" below.

Default size: N = 1024 words, M = 8 bits, K = 16 spares, laid out as a
32 x 32 array.

## The user port

| port | meaning |
|---|---|
| `req`, `we`, `addr`, `wdata` | one access per cycle; hold `req` high for one cycle |
| `rdata` | read data, valid in the cycle after a read; held otherwise |
| `mode_bistar` | 1 = BISTAR (test and repair), 0 = SR_only (re-mapping only, no testing) |
| `repaired` | with `rdata`: the address just read is permanently re-mapped |
| `faulty_data` | with `rdata`: the word came from a spare that replaced a faulty cell and the user has not written it since; its content may be the corrupted value copied out of the bad cell |
| `stop_repairing` | fewer than two free spares were left to start a test; testing has stopped until reset |
| `faults` | fault-injection descriptors (see below); tie to all zero (`FLT_NONE`) |
| `testing`, `bist_phase`, `bist_grant`, `ev_*` | monitoring only |

The user never waits. The array has one port, and a user access always owns
it in its cycle. The test simply pauses. The only cost to the user is the CAM
look-up in the address path, a fixed combinational delay before the array.

**Diagnosis.** To read out the repair map, set `mode_bistar = 0`, wait for
`testing` to fall, read every address and note where `repaired` is high.

## Re-mapping: spares and the CAM

Spare s_i is word N + i of the array. It is tied to CAM line i by its position,
so a line stores only the address it replaces, never a spare address.
`remap_cam` is a register array with match and priority-encode logic. Each
line holds:

* `addr`: the user address that is re-mapped;
* `valid`;
* `perm`: the cell failed its test and the line stays for good. When clear,
  the cell is only isolated for the running test.
* `written`: the user has written the spare since the line was allocated.
  This drives `faulty_data`.

`remap_logic` looks up every user address. On a hit it drives N + line to the
array; on a miss it passes the address through. Controller accesses carry
physical addresses and skip the CAM, so the controller can reach the real cell
behind a re-mapped address. The CAM is cleared by reset, so the repair map
does not survive a power cycle. A non-volatile CAM would keep it.

## The on-line test

### Neighbourhoods on a torus

The array is organised by columns: address = col x ROWS + row, so cells above
and below each other have consecutive addresses. Every cell has eight
neighbours, numbered clockwise from the upper left:

```
  n0 n1 n2
  n7 cx n3        n1/n5: address -/+ 1      n7/n3: address -/+ ROWS
  n6 n5 n4        corners: address -/+ ROWS -/+ 1
```

The first and last rows count as adjacent, and so do the first and last
columns, so every cell has a full neighbourhood and the controller needs no
edge cases (`neighbor_addr`). This also tests a few pairs that are not really
adjacent, which costs some extra test time.

### The pair sequence

For each pair (c_x, n_j) and a background word D, the controller makes these
14 accesses to the physical cells and checks every read of c_x:

```
wD(cx) wD(nj) rD(cx) w~D(nj) rD(cx) wD(nj) rD(cx)
w~D(cx) wD(nj) r~D(cx) w~D(nj) r~D(cx) wD(nj) r~D(cx)
```

Writing and reading both D and ~D in c_x finds stuck-at faults. The
0→1 and 1→0 writes of c_x between the neighbour accesses find transition
faults. Toggling n_j while c_x holds a known value finds idempotent and
inversion coupling from the neighbour. Address faults that make c_x and n_j
share storage show up as wrong reads of c_x.

**Backgrounds.** Pair t uses neighbour j = t mod 8 and D = a single one at
bit (t mod M), a walking one with its complement the walking zero. The
walking patterns find coupling between bits of the same word. A cell gets
max(8, M) pair tests:

* M = 8: each neighbour once, each background once, 8 x 14 = 112 test
  accesses per cell;
* M = 32: the neighbour pairs are repeated four times, 448 accesses;
* M < 8: the backgrounds are repeated.

### Isolate, test, restore or repair

For each user cell in address order, `bistar_controller`:

1. Isolates c_x: it copies the word into a free spare s_a and allocates CAM
   line a. From then on, user accesses to c_x go to s_a.
2. For each pair, isolates n_j into a second spare s_b in the same way, then
   runs the 14 accesses.
3. If a read mismatched, runs the same pair once more.
   * If the repeat passes, the first failure was transient and testing goes
     on.
   * If it fails again, line a becomes permanent: c_x stays re-mapped for
     good, n_j is restored, and the controller moves to the next cell.
4. If the pair passed, copies s_b back into n_j and frees line b. After the
   last pair, copies s_a back into c_x and frees line a.

The repeat separates permanent faults from one-off upsets, and it also
affects how intermittent faults are classified. A coupling fault can be
triggered by the user's own writes to the aggressor word during an unrelated
pair of the victim's test. That failure is then counted as transient, unless
the user's writes trigger it again during the repeat. The pair that
exercises the aggressor directly still finds the fault and makes it
permanent.

Cells that are already permanently re-mapped are skipped. So are pairs whose
neighbour is permanently re-mapped, because its physical cell is known to be
bad and could make c_x look faulty.

**Cost.** With an idle user, a cell takes 193 clock cycles:

* 3 to isolate c_x;
* 8 pairs of 23 cycles each: 3 to isolate n_j, 1 to start, 14 accesses,
  1 for the last compare, 3 to restore n_j, 1 to step;
* 1 to finish;
* 3 to restore c_x;
* 2 to move to the next cell.

A full pass over 1024 words therefore takes about 198 k cycles plus whatever
time the user takes on the port.

### Sharing the port with the user

A controller access happens only in a cycle without a user access. Read data
come back one cycle after the read, so compares run in a one-stage pipeline
and back-to-back test accesses are possible.

A copy (isolate or restore) takes three steps: read, capture, write. The user
could write the address being copied between the read and the write. That
write would land in the source word after it was read, and would be lost.
The controller therefore snoops user writes to that address into its capture
register. The final spare write and the CAM update (allocate or release)
happen in the same granted cycle. As a result, a user read or write before,
during or after a copy always sees the latest data.

### Running out of spares, and SR_only

A test needs two free spares: one for c_x and one for n_j. When fewer than two
CAM lines are free at the start of a cell, `stop_repairing` rises and stays
high until reset. From then on the RAM behaves as in SR_only mode: existing
re-mappings work, and nothing new is tested.

Dropping `mode_bistar` stops the test at the next pair boundary. The
controller restores c_x first, so no spare is left tied up.

## Fault injection

`fault_injector` sits between the address path and the array. It holds NF
descriptor slots (`bistar_pkg::fault_t`), each addressed by physical cell and
bit:

| kind | effect |
|---|---|
| `FLT_STUCK` | bit reads and stores `value` |
| `FLT_TRANS` | bit cannot change to `value` |
| `FLT_CF_ID` | a write that moves aggressor bit `agg_bit` of cell `agg` to `agg_val` forces the victim bit to `value`; the aggressor may be the victim's own word |
| `FLT_CF_IN` | same trigger; the victim bit is inverted |
| `FLT_ADDR_NC` | cell not connected: writes lost, reads return 0 |
| `FLT_ADDR_MAP` | the cell's address reaches cell `agg` instead |
| `FLT_ADDR_MULTI` | the address of cell `agg` reaches the cell as well: writes to `agg` also land in the cell |

A single-port wrapper cannot rewrite a victim cell behind the array's back.
Coupling and transition faults are modelled instead with a one-bit shadow of
the bit that matters, plus an override on the victim bit. The override is
applied to reads until the victim is next written. Seen from the port, this
behaves the same as a faulty cell.

## Files

`rtl/`:

* `bistar_pkg.sv`: pair-sequence table, phase encoding, fault types
* `bistar_ram.sv`: top level; registers `repaired`/`faulty_data` with the read
* `remap_logic.sv`: port arbitration, CAM hit → spare address, flag decode
* `remap_cam.sv`: K-line re-mapping CAM (register array)
* `bistar_controller.sv`: test and repair sequencer
* `neighbor_addr.sv`: toroidal neighbour address
* `fault_injector.sv`: fault-emulation wrapper
* `sram_array.sv`: N+K word single-port synchronous RAM

Parameters of `bistar_ram`:

| parameter | default | meaning |
|---|---|---|
| `N` | 1024 | user words |
| `M` | 8 | word width |
| `K` | 16 | spares |
| `ROWS` | 32 | rows of the layout; N must be a multiple, with at least 3 rows and 3 columns |
| `NF` | 4 | fault slots |

The published scheme was evaluated at 8-, 16- and 32-bit words, 1K to 8K
words, and 16, 32 or 64 spares. Any of these is a parameter setting. Match
`ROWS` to the real array layout of the macro, because the neighbour
relations depend on it.

## Simulation

Each testbench in `tb/` checks itself and ends with
`TB_RESULT checks=<n> failures=<n>`. The package goes first and `-y` finds the
modules, for example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module tb_bistar_ram rtl/bistar_pkg.sv tb/tb_bistar_ram.sv -o simv
obj_dir/simv
```

Testbenches:

* `tb_bistar_ram`: 64 words, 5 spares, under random traffic. It injects
  stuck-at, neighbour coupling, an address fault and a transient fault, and
  checks:
  * the expected permanent repairs and the transient;
  * `faulty_data` and `repaired`;
  * a MATS+ march through the user port;
  * SR_only diagnosis;
  * that spares run out and `stop_repairing` rises.

  It counts each mechanism (test paused for the user, access to an isolated
  cell, snooped copy, failure, transient, repair, abort, full pass) and fails
  if one never happens.
* `tb_bistar_ram_full`: the default size (1024 x 8, 16 spares). One full test
  pass of the whole array with faults and traffic, then MATS+ and diagnosis.
  It runs in under a second.
* `tb_bistar_ram_wide`: 32-bit words. It checks 448 test accesses per cell and
  finds an intra-word inversion coupling, a stuck-at on bit 31 and an address
  that reaches two cells.
* `tb_bistar_controller`: the controller alone, with model RAM and CAM. It
  checks the exact access sequence, neighbours and backgrounds, 112 accesses
  and 193 cycles per cell, that memory content is unchanged after a pass,
  yielding to the user, and a repair.
* `tb_remap_cam`, `tb_remap_logic`, `tb_neighbor_addr`, `tb_sram_array` and
  `tb_fault_injector`: one per block.

## Departures and open points

* **Spare cells are not tested or repaired.** In the published scheme the CAM
  can re-map any of the N + K words, spares included. How a spare would be
  tested is not specified: it has no place in the neighbour layout, and
  re-mapping an in-use spare would need a chained look-up. Only the N user
  words are tested here. A spare that goes bad after it has been allocated is
  not detected.
* **Array layout.** The layout (`ROWS`) has to come from the SRAM macro; 32 x 32
  is only a default. The spare words are taken as an extension of the same
  array at addresses N..N+K-1.
* **Backgrounds.** The walking-one background order and the mapping
  pair t → (neighbour t mod 8, bit t mod M) are this design's reading of
  "a different background per pair, repeating patterns or pairs to fill the
  gap".
* **Chosen behaviour.** The following are this design's own choices:
  * a pair with a neighbour that is already repaired is skipped;
  * a cell that is already repaired is skipped;
  * SR_only takes effect at a pair boundary;
  * `stop_repairing` is sticky;
  * user writes are snooped during copies.
* **`faulty_data`** counts user writes from the moment the spare was
  allocated. A word the user rewrote while it was under test is therefore not
  flagged after a permanent repair.
* **Fault injector, one address reaching two cells.** When one address
  reaches two cells, a read returns the word of the addressed cell. How two
  selected cells would really read out is left open.
* **Timing.** Read latency is one cycle, `rdata` and the flags are
  registered, and reset is asynchronous and active low. These are not taken
  from the published scheme.
