# Regional calorimeter trigger slice: phase, adder, isolation, sort and boundary-scan logic

A first-level calorimeter trigger has to make a decision for every 25 ns beam
crossing. Within a fixed number of clock cycles, it looks at tower energies from
thousands of serial links and finds electron candidates and energy sums. This
RTL models the five custom chips that do that work in a regional trigger crate.
They are written as synthesizable SystemVerilog and wired together as one
working slice:

- **Phase** takes link data onto the local clock and checks it.
- **Adder** sums energies in a pipelined tree.
- **Isolation** finds the best isolated electron pair in a 4×4 tower region.
- **Sort** keeps the four largest candidates.
- **Boundary Scan** drives shared tower data, reduces corner towers, and carries
  an IEEE 1149.1 test port.

Everything after the receiver runs at 160 MHz. That gives exactly four clock
slots of 6.25 ns per crossing, and most of the design is built around those
four slots.

## Clocking and the four-slot crossing

| Domain | Clock | What runs there |
|---|---|---|
| receiver | `rx_clk`, 120 MHz | one 8-bit word per link per cycle, three words per crossing |
| local | `clk120` | frame assembly, same frequency, unknown fixed phase |
| system | `clk160` | all processing; slot counter 0..3 per crossing |

The top module (`rct_slice`) keeps a free-running 2-bit slot counter on
`clk160`:

- The Phase ASIC output multiplexers use it as their select.
- The Isolation ASIC takes its "cycle 1" strobe from slot 2.
- The Sort ASIC loads its first half-group on even slots.
- The link error counters count once per crossing, at slot 0.

## Phase ASIC (`phase_asic`)

Each of the four links delivers 11 bits per receiver cycle:

- 8 data bits;
- 2 status bits;
- 1 error bit.

Three words form a 24-bit frame. The frame holds two towers (8-bit E_T plus a
fine-grain bit each), a 5-bit Hamming check code, and a spare bit:

| word | bits 7..0 |
|---|---|
| 0 | tower 0 E_T |
| 1 | tower 1 E_T |
| 2 | `{fg0, fg1, edc[4:0], spare}` |

### Data path

1. **`phase_fifo`**: a 44-bit × 18-word elastic buffer holding six frames of
   all four links. It moves the words from `rx_clk` to `clk120`. Both sides run
   at the same rate, so the write pointer free-runs. The read pointer starts
   half the buffer behind, and no full or empty logic is needed. `rvalid` rises
   DEPTH/2+1 read cycles after reset.
2. **`phase_cntrl`** (one per link) finds the frame boundary.
   - Status `00` means data; any other code means the link is in setup.
   - The word counter is held at zero during setup, so the first data word
     after setup starts a frame.
   - A completed frame waits in a register. It is handed over when the local
     crossing counter reaches phase 1.
   - If no new frame arrived since the previous hand-over, the link is marked
     *down*. The receiver error bit is ORed over the three words.
3. **`edc_check`** recomputes the Hamming(23,18) code and compares it with the
   one received. Data bit *j* sits at the *j*-th codeword position that is not a
   power of two (3, 5, 6, 7, 9…15, 17…23). Check bit *i* is the parity of the
   data bits whose position has bit *i* set. A nonzero syndrome flags the frame.
   It catches every single and double error. Nothing is corrected.
4. **Zeroing.** A link with a code mismatch, a receiver error or a *down* flag
   has both towers forced to zero, so a dead link cannot fake energy.
5. **Output.** There are two 9-bit data channels and one 9-bit error channel.
   Slot `s` puts towers `s` and `4+s` on channels A and B and link `s`'s error
   word on the error channel. The error word is
   `{any_err, rx_err, status[1:0], edc[4:0]}`.

### Output registers and test mode

The output registers are loadable counters. Normally they load new data every
cycle. With `test_mode` high, they count instead (`cnt_clr` clears them,
`cnt_en` advances them), and the error channel is held at zero. The counts
address the receiver look-up tables like real data, so any test pattern can be
sent through the rest of the system.

### Error counters

Per-link error flags go to `link_error_counter`: 16-bit saturating counters,
read through a select/data port. This stands in for the crate processor's bus
access.

## Adder ASIC (`adder_asic`)

The adder takes eight 13-bit operands, `{AOV, TOV, value[10:0]}`, where the
value is two's complement. The sum has the same format.

- **Adder tree.** Three levels of 12-bit adders (4, 2, 1), with a register after
  each level and an input register in front: four stages in all.
- **12-bit adders.** Each 11-bit value is placed in the upper bits of a 12-bit
  adder, with the LSB forced to zero.
- **AOV (arithmetic overflow).** It is set when an add overflows: both operands
  have the same sign and the result's sign differs. It is ORed along the
  pipeline together with the incoming AOV bits.
- **TOV (tower overflow).** It is the OR of the eight TOV inputs. With `master`
  high, an input at the largest positive value (0x3FF) also counts as a tower
  overflow. This is this design's reading of master versus slave chips in a
  larger tree.
- **Bypass.** `bypass` switches the output to an 8:1 multiplexer, which passes
  operand `byp_sel` from the input register, with both flags cleared.

**Latency:** a result appears after the 4th rising clock edge, counting the edge
that captures the operands. A new set of operands can enter every cycle.

## Isolation ASIC (`isolation_asic`)

**Input.** The Isolation ASIC sees a 4×4 region one row per cycle. Each tower
is `{veto, e[6:0]}`. Along with the rows come:

- the four top-edge neighbours, used in cycle 1;
- the four bottom-edge neighbours, which arrive in the last cycle and are held
  for use;
- one left and one right neighbour per row.

**What it finds.** For every reference tower it forms the four sums with its
left, bottom, top and right neighbours. It keeps only the sums where the
reference is at least as large as the neighbour, and finds the largest kept
sum. It then reports the largest over all 16 towers, with both towers' veto
bits.

Three blocks per column do the work:

- **`iso_input_staging`**: three registers per column delay the data, so each
  reference tower appears together with the tower above and the tower below. At
  the first and last row, multiplexers substitute the top-edge and held
  bottom-edge towers.
- **`iso_add_compare`**: four 8-bit sums. A sum passes only if `ref >= nbr`;
  otherwise zero is passed.
- **`iso_find_max`**: a two-level comparator tree, one register per level.

A final stage takes the maximum over the four columns in two steps. It then
accumulates over the four rows of a crossing. When the crossing completes, it
writes the result to `cand` and raises `cand_stb`.

**Ties.** An equal value never replaces the current maximum. The lower index
(left, bottom, top, right; column 0 first; earlier row first) therefore wins.

**Latency.** The candidate of a crossing is valid 12 cycles (75 ns, three
crossings) after the `cyc1` strobe of its first row. `cand_stb` stays low until
the pipeline has filled after reset.

## Sort ASIC (`sort_asic`, `sort_max4`)

The Sort ASIC finds the four largest of eight operands, not in any order. Each
operand is 10 bits: a 6-bit rank, compared, and a 4-bit tag, carried along. The
operands arrive four at a time over two cycles: `first` marks the first half.

**Algorithm.** The eight operands form a left and a right group of four. A
stage compares `L[i]` with `R[i]` and puts the larger on the left. Between
stages, the right group is rotated by one position (`R[i] <= R[i+1]`). After
four stages, every right-hand value has met every left position. The left group
then holds the four largest. This was checked over all 8! input orders.

**Pipeline.**

- Stages 1–2 are combinational on the assembled eight operands, then a register.
- Stages 3–4 follow, then the output register.
- If the first half enters in cycle 0, `top4` is valid in cycle 4, with
  `top4_stb`.
- `sel` selects a bypass instead, which passes the last four inputs through the
  same pipeline delay.

## Boundary Scan ASIC (`bscan_asic`, `jtag_tap`)

- **Tower data.** Words to be sent to neighbouring cards are registered and
  driven out (`pass_out`).
- **Corner towers.** These are reduced from 7 to 3 bits. The low three bits
  pass, unless any of bits 6..3 is set, in which case the output saturates at
  `3'b111`.
- **Test port.** `jtag_tap` is also used in the Phase and Adder chips, with
  scan cells between their output registers (or output mux) and the pins. It is
  a standard 16-state TAP with a 3-bit instruction
  register:

  | IR | instruction |
  |---|---|
  | `000` | EXTEST |
  | `001` | SAMPLE |
  | any other | BYPASS |

  The IR capture value is `001`. The boundary register covers every input pin
  and every core output and is shifted LSB first. Under EXTEST, the update
  register drives the output pins. TDO changes on the falling edge of TCK, and
  `trst_n` resets the TAP asynchronously.

## Receiver look-up tables (`rx_lut`)

Each 8-bit tower code addresses a 256-entry, 17-bit table. The table gives a
7-bit electron energy and a 10-bit E_T. The tower's fine-grain bit, delayed to
match the registered read, becomes the veto bit. The table contents are not
initialised: load them through `lut_we/lut_waddr/lut_wdata` before use.

## The slice (`rct_slice`)

**Phase ASICs and error counters.** Two Phase ASICs take eight links, and their
four output channels give one row of four towers per slot. All eight link error
flags feed the error counters.

**Isolation and Sort.** The towers go through the look-up tables to:

- the Isolation ASIC (columns A–D), with edge neighbours from outside
  (`te_in`, `be_in`, `le_in`, `re_in`);
- the Boundary Scan ASIC.

The isolation candidate becomes a Sort operand, with rank `sum[7:2]` and tag
`{veto_ref, veto_nbr, 00}`, together with seven candidates from outside
(`sort_ext`).

**Adder.** The four E_T values of each row go into the Adder with four further
operands from outside (`add_ext`), so `row_sum` is a per-slot partial sum.

**Test port.** The Phase, Adder and Boundary Scan chips each contain a
`jtag_tap`. Their four TAPs form one chain: `tdi` → Phase 0 → Phase 1 → Adder →
Boundary Scan → `tdo`. In BYPASS, the chain is four bits long.

## Where this departs from the original chips

- **Sort operand width.** The chip documentation says 6-bit values, and its
  block diagram shows 10-bit internal operands with wider input and bypass
  buses. This RTL compares 6 bits and carries 4 tag bits. The packing of those
  wider buses is not modelled.
- **Isolation input count.** 32 towers per crossing are used: 16 in the region
  plus 16 edge neighbours. The original counts 36; the four diagonal corner
  towers enter no sum here and are left out.
- **Input scan cells.** The original puts scan cells on the outputs of the
  Phase and Adder chips. Here they also carry capture-only cells on their
  inputs, so SAMPLE shows the input pins too.
- **Links and drivers.** The serial receiver chip, the ECL drivers and the
  crate bus are not modelled. Their signals are plain ports.
- **This design's own choices.** These are not specified by the original:
  - the frame word layout;
  - the status encoding;
  - the Hamming bit placement;
  - the master-mode TOV rule;
  - the tie rules;
  - all counter widths;
  - the look-up table output widths;
  - how the chips are wired together in the slice;
  - resets, which are synchronous and active high everywhere except TRST.

## Simulating

Every module has a self-checking testbench in `tb/` named `tb_<module>`. It
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
hangs. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -y rtl \
    rtl/rct_pkg.sv tb/tb_rct_slice.sv --top-module tb_rct_slice -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `rct_slice` with any module name to run its own test.

`tb_rct_slice` runs the whole slice at its default sizes. It:

- loads random look-up tables;
- drives eight links with random frames;
- checks every output against a reference model written in the testbench:
  - Phase data and error words;
  - error counts;
  - isolation candidates;
  - adder sums;
  - top-four sets;
  - boundary-scan outputs.

It also counts how often each mechanism occurred:

- link zeroing;
- setup mode;
- TOV and AOV;
- adder and sort bypass;
- disabled isolation sums;
- corner saturation;
- test-counter mode;
- JTAG BYPASS through the four-TAP chain.

A mechanism that never occurred counts as a failure. The run takes well under a
second.
