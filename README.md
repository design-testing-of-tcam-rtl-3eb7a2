# Ternary CAM with asymmetric cells and a built-in T_H comparison-fault test

A ternary content-addressable memory (TCAM) compares a search key with every
stored word at once. Each bit of a stored word and of the key can be 0, 1 or
X (don't care). That parallel comparator sits in every cell. A defect in it
shows up only in the result of a Compare, never in a Read. Ordinary RAM march
tests therefore cannot find it.

This RTL holds two things:

- an N x B TCAM built from *asymmetric* cells, with a Hit output and a
  priority address output;
- a controller that runs **T_H**, a march-like test. T_H finds every
  comparison fault of such a TCAM while looking only at the Hit output. It
  uses 7N Writes and 3N+2B Compares, and it reports which fault type it found.

There is also a small controller that lists every address matching a key.
The priority encoder reports only the best match; the controller works
around that.

The default size is the 3 x 3 array of the worked example (`N = 3`, `B = 3`).
Every module is parameterised for any N x B.

## The asymmetric cell and its faults

An asymmetric cell (`tcam_cell`) holds two bits:

| Q_U (BCAM bit) | Q_L (mask bit) | stored value |
|---|---|---|
| 0 | 1 | 0 |
| 1 | 1 | 1 |
| any | 0 | X |

Writing X always stores (0,0).

With Q_L = 1 the cell is a plain binary CAM bit: it matches when Q_U equals
the key bit. With Q_L = 0, the mask transistor (m4) is off, and the cell can
never pull the word's match line down. A key bit of X drives neither search
line, so it matches anything.

The test rests on one point. Because of this structure, every comparison
fault of the TCAM cell is either:

- a fault of its BCAM bit, visible while the mask holds 1, or
- m4 stuck on, visible only while the mask holds 0 and the key bit is 0. The
  key bit 0 turns on m3, and the stuck-on m4 completes a discharge path.

The BCAM faults are defined by how an unmasked cell answers the four
compare-after-write pairs (M = match, MM = mismatch):

| fault | w0,c0 | w0,c1 | w1,c0 | w1,c1 | meaning |
|---|---|---|---|---|---|
| none  | M  | MM | MM | M  | |
| SMF   | M  | M  | M  | M  | stuck at match |
| SMMF  | MM | MM | MM | MM | stuck at mismatch |
| PM1F  | MM | MM | M  | M  | matches only while storing 1 |
| PM0F  | M  | M  | MM | MM | matches only while storing 0 |
| CM1F  | MM | M  | MM | M  | matches only a key bit of 1 |
| CM0F  | M  | MM | M  | MM | matches only a key bit of 0 |
| EMM1F | M  | MM | MM | MM | false mismatch on (1,1) |
| EMM0F | MM | MM | MM | M  | false mismatch on (0,0) |
| IM1F  | M  | MM | M  | M  | false match on stored 1 / key 0 |
| IM0F  | M  | M  | MM | M  | false match on stored 0 / key 1 |

The cell takes a `fault` input (`cell_fault_e` in `tcam_pkg`). It applies the
row for that fault while the cell is unmasked. A masked cell normally always
matches, with two exceptions:

- **m4 stuck on** (`F_M4_SON`): the masked cell mismatches a key bit of 0.
- **PM1F**: the masked cell mismatches any care key bit, because it holds
  Q_U = 0. The table above says nothing about masked cells. This design
  models PM1F as a defect in the Q_U = 0 discharge path that the mask does
  not isolate. It is the one reading that gives the fault dictionary below,
  where PM1F also fails the (wX,c0) compare. Treat this as a modelling
  choice.

A twelfth model, **m4 stuck open** (`F_M4_SOP`), cuts the discharge path for
good. The cell then always matches, like SMF.

The fault input exists so that the test can be exercised. `tcam` and the top
route it to a single cell (`fi_en`, `fi_word`, `fi_bit`, `fi_kind`). With
`fi_en = 0` every cell is fault free. Tie it off in a real use.

## The TCAM

`tcam` follows the usual CAM organisation:

- an address decoder and a Data I/O read path, as in a RAM (`addr_decoder`,
  `data_io`);
- N words (`tcam_word`). Each word has B cells and a Valid bit that gates its
  match line;
- a Comparand Register (`comparand_reg`), which holds the key while all words
  compare against it;
- a Hit Signal Generator (`hit_sig_gen`): Hit = M0 | M1 | ...;
- a priority address encoder (`prio_addr_enc`), in which the lowest matching
  address wins.

There is one operation port: `op`, `addr`, `wdata`, `wcare`, with
`wcare[b] = 0` meaning X. It accepts one operation per clock:

| op | effect | result |
|---|---|---|
| `OP_WRITE` | writes the ternary word and sets its Valid bit | none |
| `OP_READ` | reads word `addr` | `rvalid`, `rdata`, `rcare` one cycle later |
| `OP_COMPARE` | loads the key into the Comparand Register, then compares it with all words in the next cycle | `hit_valid`, `hit`, `pae_found`, `pae_addr` two cycles later |

A Compare sees every Write issued before it. A Write in the cycle right after
a Compare does not disturb that Compare. Reset clears the Valid bits, the
Comparand Register (to all X) and the output registers. It does not clear the
cell contents, as with an SRAM. A word that has never been written never
matches. Nothing clears a Valid bit except reset.

## The T_H test

T_H has six test elements. "w1" writes all ones into the addressed word. "cP"
compares a key with all words at once.

| element | operations | expected Hit | what it exposes |
|---|---|---|---|
| TE1 | each word: w1 | – | initialises the array to all 1 |
| TE2 | each word: wX, cP0, w0, cP0, w1 | 1, 1 | (wX,c0): m4 stuck on; (w0,c0): false mismatch |
| TE3 | for each column j: key with 0 in column j, X elsewhere | 0 | (w1,c0): false match |
| TE4 | each word: w0 | – | array to all 0 |
| TE5 | each word: w1, cP1, w0 | 1 | (w1,c1): false mismatch |
| TE6 | for each column j: key with 1 in column j, X elsewhere | 0 | (w0,c1): false match |

This adds up to 7N Writes and 3N+2B Compares.

The test can watch a single word through a Hit signal that is shared by all
words because of the array contents at each step:

- **TE2 and TE5:** every other word holds the opposite of the key, so only
  the word under test can make Hit 1. A cell that falsely mismatches drops it
  to 0.
- **TE3 and TE6:** the key cares about only one column, and every word
  mismatches it there. A single cell that falsely matches therefore raises
  Hit.

Each compare belongs to one of five classes, E0 to E4. The set of failing
classes (the syndrome) names the fault type:

| fault | E0 (wX,c0) | E1 (w0,c0) | E2 (w1,c0) | E3 (w1,c1) | E4 (w0,c1) |
|---|---|---|---|---|---|
| SMF   | 0 | 0 | 1 | 0 | 1 |
| SMMF  | 0 | 1 | 0 | 1 | 0 |
| CM1F  | 0 | 1 | 0 | 0 | 1 |
| CM0F  | 0 | 0 | 1 | 1 | 0 |
| PM1F  | 1 | 1 | 1 | 0 | 0 |
| PM0F  | 0 | 0 | 0 | 1 | 1 |
| EMM1F | 0 | 0 | 0 | 1 | 0 |
| EMM0F | 0 | 1 | 0 | 0 | 0 |
| IM1F  | 0 | 0 | 1 | 0 | 0 |
| IM0F  | 0 | 0 | 0 | 0 | 1 |
| m4 stuck on | 1 | 0 | 0 | 0 | 0 |
| m4 stuck open | 0 | 0 | 1 | 0 | 1 |

The eleven signatures of the first eleven rows are all different, so a single
faulty cell is both detected and classified. m4 stuck open behaves exactly like
SMF, so it is caught but cannot be told apart from SMF. The location of the
faulty cell is not reported.

### The controller (`th_bist`)

`th_bist` is a sequencer. It has:

- an element state (`th_elem_e`), a word counter, an operation index within
  the element, and a column counter for TE3 and TE6;
- combinational decode of these into the TCAM operation for the cycle.

The word loops run in ascending address order by default. Set `DESCENDING = 1`
(`TH_DESCENDING` on the top) to run them descending; either order is valid for
the test. TE3 and TE6 start at bit 0.

For each Compare it issues, it pushes the expected Hit and the E class into a
delay line that is `CMP_LATENCY` (2) stages deep. The TCAM's Hit response
comes out at the same time as that entry, and the controller compares the
two. An assertion checks that `hit_valid` arrives exactly then. A wrong Hit
sets that class's bit in `syndrome` and increments `fail_count`.

After a pulse on `start`:

- the controller issues 10N+2B operations, one per cycle;
- `done` rises 10N+2B+2 clock edges after the edge that samples `start`;
- `pass = done & (fail_count == 0)`.

`n_writes` and `n_compares` count what was issued. The test leaves every word
at all 0 and valid.

## Reading out every match (`match_enum`)

The priority encoder names only the best match. `match_enum` lists every
matching address. For each match it:

1. compares the key;
2. reports the priority address on `found_valid`/`found_addr`;
3. reads that word and saves it in an N-entry register file;
4. overwrites the word with the bitwise complement of the key, with every bit
   cared. The word now mismatches on every care bit of the key, so the next
   compare finds the next match.

When a compare finds nothing, the saved words are written back and `done`
rises. The addresses come out in priority order (ascending).

Timing: 6 cycles per match, plus 3 cycles for the final, missing compare,
plus 1 cycle per restored word. The key must have at least one care bit. An
all-X key matches an overwritten word too, so the search is capped at N
matches.

## Top level (`tcam_th_top`)

`tcam_th_top` connects the TCAM, the T_H controller and `match_enum`:

- `test_mode = 0`: the normal operation port drives the TCAM.
- `test_mode = 1`: the controller drives it. Pulse `test_start`, then wait for
  `test_done`, and read `test_pass` and `test_syndrome` (bit i = class Ei).

`test_elem` shows the element in progress. Compare and Read results are always
visible on the outputs. Do not change `test_mode` while `test_busy` is high.

In normal mode, pulsing `enum_start` (with the key on `enum_key`/`enum_care`)
runs `match_enum`. While `enum_busy` is high, the normal port is ignored.

## Where this design adds to or departs from the test description

- **Algorithm vs hardware.** The test is specified as an algorithm. The
  sequencer, the mode multiplexer, one operation per cycle and the 1- and
  2-cycle latencies are this design's own.
- **Masked-cell behaviour.** The cell is modelled at logic level, not as
  transistors. How the BCAM faults behave in a masked cell is not specified.
  They are assumed to have no effect there, except PM1F (see above).
- **Address order.** The test allows any address order. This design runs
  every word loop in one order, chosen by a parameter: ascending by default,
  or descending.
- **PAE.** The priority encoder is built, and `match_enum` uses it; T_H does
  not. The companion test for TCAMs with a priority-encoder output only (T_PAE: 4N
  Writes, 3N+2B Compares) is not built, because its steps are not specified.
- **Not covered.** RAM faults of the storage cells are not addressed. They
  are left to ordinary march tests.

## Files

Package: `rtl/tcam_pkg.sv`: operation, fault and test-element enums, and
`addr_width()`.

RTL, bottom-up: `tcam_cell`, `tcam_word`, `addr_decoder`, `comparand_reg`,
`hit_sig_gen`, `prio_addr_enc`, `data_io`, `tcam`, `th_bist`, `match_enum`,
`tcam_th_top`.

Testbenches (`tb/`): one self-checking testbench `tb_<module>` per module.
Each prints `TB_RESULT checks=<n> failures=<n>`. `tb/tb_ref_pkg.sv` holds the
reference tables above (cell responses and fault dictionary). The
testbenches compare against these tables, never against the RTL's own logic.

- `tb_tcam_cell`: every fault × stored 0/1/X × key 0/1/X.
- `tb_tcam`: 20,000 cycles of random traffic on an 8 × 6 array against a
  ternary model, including a faulty cell.
- `tb_th_bist`: a 6 × 5 array, run with ascending and descending word loops
  (through `tb/th_bist_harness.sv`). It checks the operation stream against the
  test written out independently, the cycle count and the operation counts,
  and every fault type at random cells.
- `tb_match_enum`: 60 random keys on an 8 × 6 array. It checks the reported
  list, the cycle count, and that the contents are restored.
- `tb_tcam_th_top`: the end-to-end test at the default 3 × 3 size. It covers
  normal-mode traffic, a readout of all matches, a fault-free test, all 12
  fault types in all 9 cells (each must give its signature), and a return to
  normal mode. It also checks the array contents at the start of TE2, TE3,
  TE5 and TE6: all 1, all 1, all 0, all 0.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/tcam_pkg.sv tb/tb_ref_pkg.sv tb/tb_tcam_th_top.sv \
    --top-module tb_tcam_th_top -o sim
./obj_dir/sim
```

For any other testbench, swap in its name. Modules are found through `-Irtl`
and `-Itb`. To test a larger array, change `N` and `B` in a testbench's
`localparam`s. All testbenches take well under a second.
