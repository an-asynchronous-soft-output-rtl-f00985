# Soft-output Viterbi decoder with a ring-memory traceback

This is a soft-output Viterbi algorithm (SOVA) decoder for an 8-state,
rate-1/3 convolutional code. For each information bit it produces a
hard decision and a 6-bit reliability, so it can serve as the component
decoder of an iterative (turbo) decoder. The architecture was designed
for low power, in a self-timed (clockless) style.

- **Survivor memory stays put.** Each trellis step's survivor pointers
  and path metric differences are written once, into one cell of a ring
  of register cells. They are never shifted. Only the head pointer moves,
  and the traceback walks the ring from the newest step back to the
  oldest one.
- **Soft output in the same pass.** The pass first finds the
  maximum-likelihood path (a Viterbi traceback). Then, over a later
  window, it follows that path and its competitor together and updates
  the reliability. This is the "two-step" SOVA.
- **Handshakes between units.** The branch metric unit, the
  add-compare-select (ACS) unit and the traceback ring exchange data
  with 4-phase request/acknowledge handshakes. The units are chained as
  a Muller pipeline.

The RTL here is a synchronous rendering of that design. Every C-element
and handshake register is clocked, and one clock stands in for each
matched delay. The data path, word widths, algorithm and handshake
sequencing follow the original design. The section on departures below
lists where this version differs.

## The code and the numbers

| Item | Value |
|---|---|
| States | 8 (constraint length K = 4) |
| Rate | 1/3; G0 = 1+D²+D³, G1 = 1+D+D³, G2 = 1+D+D²+D³ (feed-forward) |
| Soft input | three 3-bit two's-complement symbols per step; positive means bit 1 |
| Branch metric | 5 bits, range -9..12 |
| State metric | 8 bits, modulo arithmetic (no normalisation) |
| Path metric difference, soft output | 6 bits; `111111` is "infinity" |
| Traceback ring | 22 cells: 14 Viterbi steps, then an 8-step soft-update window |
| Latency | 22 symbols: output k is information bit k-22 |

**State numbering** (`sova_pkg`). A state holds the last three input
bits, with the newest in the LSB: `state(n) = {u[n-2], u[n-1], u[n]}`.
So the decoded bit of any traced state is its LSB. The two predecessors
of state `s` are `{0, s[2:1]}` and `{1, s[2:1]}`. A survivor pointer is
therefore a full 3-bit predecessor state, and following a pointer needs
only a table lookup.

## Branch metrics (`bmu`)

For antipodal symbols, the squared distance `(y - c)²` reduces to `-y·c`
once the terms common to all branches are dropped and the constant
factor is removed. So for the output code `{g2,g1,g0}` the branch metric
is the sum of `-y[i]` where `g_i = 1` and `+y[i]` where `g_i = 0`. A
smaller metric means a more likely branch.

The unit builds all eight metrics at once. Each metric negates its
selected inputs and sums the three terms with two 5-bit self-timed
adders. Its `done` output is the AND of the 16 adder completions, and
that signal gates the request to the ACS unit.

## Self-timed adder (`st_adder`)

The carry travels on two rails, C and CN:

    C[i]  = A·B   + C[i-1]·(A⊕B)
    CN[i] = A'·B' + CN[i-1]·(A⊕B)

- **Data-dependent carry chain.** A stage whose operand bits are equal
  knows its carry at once. Only a run of bits that propagate the carry
  has to wait. So the average carry chain is about log2 N bits long,
  not N.
- **Completion.** A stage is complete once one of its rails is high,
  and `done` is the AND over all stages.
- **Return to zero.** While `go` is low, every rail is held at 00
  ("not ready").

In this clocked version the adder is plain combinational logic and
`done` is high within the cycle. The completion signals are still wired
into the handshakes, as in the original.

## Add-compare-select (`acs_pe`, `acs_unit`)

The ACS unit is state-parallel: eight `acs_pe` elements, one per state,
read the state metric registers through the shuffle-exchange wiring of
the trellis. Each element works as follows:

1. It forms the two candidate metrics `m0 = pm0 + bm0` and
   `m1 = pm1 + bm1`.
2. A C-element waits for both adders to complete, and a register
   latches the two sums as it fires. The register keeps adder glitches
   away from the compare stage and holds the result while the state
   metrics are rewritten.
3. It subtracts the latched sums, `d = m0 - m1`, in 8-bit two's
   complement.
4. It keeps the smaller candidate. Ties keep the candidate from the
   predecessor with MSB 0.
5. It outputs `|d|`, clipped to 63, as the path metric difference.

**Why the compare works without normalisation.** All state metrics
stay within 63 of each other: any state can be reached from the best
state in 3 steps of at most 21 each. The 8-bit registers wrap freely,
but the difference of two metrics, read as a signed 8-bit number, is
still exact. So `m0 < m1` exactly when `d` is negative.

When the unit accepts a new set of branch metrics, it writes the
survivor metrics back into its registers, two clocks after the request.
In the same clock it latches the survivor pointers and differences as
its output to the traceback.
After reset, state 0 has metric 0 and every other state 32, because the
encoder starts in state 0.

## The traceback ring (`tb_cell`, `traceback_unit`, `ring_counter`)

This is the part that differs most from a textbook decoder.

**Cells.** Each `tb_cell` holds the data of one trellis step:

- a state memory: eight 3-bit pointers, giving for each state the
  predecessor on its survivor path;
- a delta memory: eight 6-bit path metric differences.

A cell is written only while it is the head of the ring. Every cell
also carries a copy of the unit's handshake sequencer (write, start,
run, output, release). Only the head cell's copy runs, and the unit ORs
the cells' `ai` and `ro`.

**Pointers.** Two one-hot ring counters hold the ring's positions.
`pHead` marks the head, and `pSOVA` marks the cell 14 steps behind it.
The traceback walks toward higher cell indices. With each new symbol
both pointers move one cell the other way, so the head lands on the
cell that held the oldest step. Relative to the head, the ring always
holds times k, k-1, ..., k-21.

**One symbol, step by step:**

1. `ri` rises, and the pointers advance.
2. The ACS data is written into the new head cell, and `ai` is raised.
   It falls again after `ri` falls.
3. The head starts the traceback at state 000. A one-clock `eval` token
   carries the path data from cell to cell. Each cell does one step:
   - **Viterbi cells** (the 14 from the head up to pSOVA) follow the
     survivor: `S ← ptr[S]`.
   - **The pSOVA cell** continues the survivor and starts the
     competitor as the other predecessor of S:
     `S' = ptr[S] with its MSB inverted`. It sets the reliability to
     `111111`.
   - **Update cells** (the 7 that follow, the last of which is the
     cell just before the head) move both paths back one step:
     `S ← ptr[S]`, `S' ← ptr[S']`. If the two paths' decisions differ
     (their LSBs differ), the cell sets
     `rel ← min(rel, delta[S])`, the survivor's path metric difference
     at that step. Otherwise `rel` passes through unchanged.
4. The token returns to the head. A one-hot multiplexer picks the last
   cell's result: the decoded bit is the LSB of the traced state, and
   the soft output is `rel`. `ro` rises and stays high until `ao`.

The next symbol is taken only after the `ro`/`ao` handshake has
returned to zero. The ACS unit can meanwhile compute the following
step, because `ai` is given as soon as the write is done.

After reset every pointer is 000 and every delta `111111`. The first 22
outputs therefore decode the encoder's all-zero history, with
reliability 63.

**Timing.** `ro` rises 24 clocks (`N_CELLS + 2`) after the edge that
accepts a symbol. With an environment that answers at once, one symbol
takes 27 clocks (`N_CELLS + 5`). At that rate, 2 MSymbol/s needs a
54 MHz clock and 5 MSymbol/s needs 135 MHz.

## The test chip (`sova_chip`)

The chip wraps the decoder with a 7-bit LFSR (x⁷+x⁶+1) and the rate-1/3
encoder, so it can decode its own traffic.

| Control | Value | Effect |
|---|---|---|
| `force_in` | 0 | the encoder takes the LFSR bit |
| `force_in` | 1 | the encoder takes the `finput` pin |
| `nforce[i]` | 0 | decoder symbol i is encoder output g_i, as soft value ±3 |
| `nforce[i]` | 1 | decoder symbol i comes from the 3-bit pin n0, n1 or n2 |

The source advances by one bit when the decoder acknowledges a symbol.
`lfsr_out` shows the current LFSR bit. The outputs are `bit_out` and
the 6-bit `dta_out`, with the `ro`/`ao` handshake. Power pads are not
modelled.

**Handshake sequence for the user.** On input: put the symbols on
n0..n2 (or select the internal source), raise `req`, wait for `ack`,
drop `req`, then wait for `ack` to fall. On output: wait for `ro`,
read `bit_out` and `dta_out`, raise `ao`, wait for `ro` to fall, then
drop `ao`.

## Departures and choices

**Departures from the original design.**

- The control is clocked. C-elements are registers, and each matched
  delay becomes one clock.
- The eval/token handshake between cells is reduced to a one-clock
  pulse that the next cell always accepts.
- The handshake circuit in each traceback cell is a small clocked state
  machine rather than a network of C-elements.
- Matched delay elements and pads are not modelled.
- The soft update implements the intended algorithm. The fabricated
  chip had a flaw that applied the update over the whole traceback
  path.

**Values chosen here, which the original does not fix:**

- the Viterbi/update split of the 22-cell ring: 14 and 8, with 8 being
  twice the constraint length;
- the tie rule in the compare;
- clipping the difference to 63;
- the reset metrics;
- the reset contents of the ring;
- the LFSR polynomial and width;
- ±3 as the soft value of internal encoder bits;
- the moment the source advances.

**Two readings of unclear points:**

- The soft update takes the survivor's own path metric difference at
  each step where the decisions differ. The "path difference of the
  traceback path" that it is compared with is read as the reliability
  carried in from the previous cell.
- The chip's pin list shows seven soft-output pins. The specification
  table gives a 6-bit soft output, and this design follows the table.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares
against values computed independently in the testbench, and ends with a
`TB_RESULT checks=N failures=M` line. `tb/sova_ref.sv` holds a
reference model for the tests: a plain integer ACS with history arrays,
and a traceback that indexes time directly rather than walking a ring.

| Testbench | What it checks |
|---|---|
| `tb_st_adder`, `tb_bmu`, `tb_acs_pe` | exhaustive or random arithmetic, including metric wrap-around and clipping |
| `tb_acs_unit` | 2000 handshaked steps, with pointers, deltas and metrics (mod 256) against the reference |
| `tb_tb_cell` | each kind of cell step, the head's handshake sequence, write protection |
| `tb_c_element`, `tb_muller_stage`, `tb_ring_counter`, `tb_lfsr`, `tb_conv_encoder` | the small blocks against their truth tables or bit-level models |
| `tb_traceback_unit` | random pointers and deltas; every output and the 24-clock traceback time |
| `tb_sova_decoder` | noiseless bits exact; noisy bits and soft outputs against the reference; corrected channel errors |
| `tb_sova_chip` | 1500 symbols at default size through all four source modes and their switches; checks `lfsr_out`, every output against the reference, and noiseless bits exactly |
| `tb_chip_1010` | the alternating stream 1010... and the 27-clock symbol period |

The end-to-end tests count how often the soft update, input
back-pressure, output waits and mode switches happen, and fail if any
never occurs.

To simulate, for example, the chip test:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/sova_pkg.sv tb/sova_ref.sv tb/tb_sova_chip.sv --top-module tb_sova_chip
    ./obj_dir/Vtb_sova_chip

The other testbenches build the same way; Verilator finds the modules
in `rtl/` through `-Irtl`.

**Parameters you can change:**

- `N_CELLS` and `SOVA_OFS` on `sova_decoder` and `traceback_unit` set
  the ring length and the Viterbi depth. The update window is
  `N_CELLS - SOVA_OFS`.
- `INIT_PM` on `acs_unit` sets the reset metric of the states other
  than 0.
- `LFSR_W` on `sova_chip` sets the LFSR width. The feedback taps are
  the two top bits, so another width also needs new taps.

The code, widths and state numbering live in `rtl/sova_pkg.sv`.
