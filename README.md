# Two-symbol MQ arithmetic encoder for JPEG 2000

The MQ arithmetic coder is the usual throughput bottleneck of a JPEG 2000
encoder. The context-formation front end can produce several context/decision
(CX-D) pairs per clock. A conventional MQ coder takes only one pair per clock,
because each symbol has to finish its renormalisation and byte output before
the next symbol can start. This RTL codes **two CX-D pairs every clock, with no
restriction on the symbols**. Its output is byte-for-byte the code stream of the
standard sequential MQ encoder.

It rests on four ideas:

1. **Split A from C.** The interval register A and the code register C sit in
   two pipeline stages. Stage 1 works out, for each symbol, what must happen to
   C: add Qe or not (`R`) and how far to shift (`RA`). Stage 2 applies that
   work one clock later. So C never waits for A's leading-zero detection.
2. **Renormalise A without a leading-zero counter.** The new interval is
   either `A-Qe` or `Qe`. `A-Qe` always needs a shift of 0, 1 or 2. `Qe` comes
   ready-shifted from a table (RQe), with its shift from a second table (RA).
3. **Mask once, shift once.** A byte-out only clears the bits of C above a
   fixed boundary. So the whole renormalisation of C (up to 15 shifts with up to
   two byte-outs) becomes one AND with a precomputed mask, then one shift.
4. **Repair, don't wait.** The mask for a second byte-out is built on the
   guess that the second byte is not stuffed. When that guess is wrong, a
   one-bit correction (ECMASK) puts back the bit the mask removed.

## Interface and timing

Top module: `mq_two_symbol_ae`. Parameters: `NUM_CX = 19` contexts and
`CX_W = 5` context bits.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `sym_valid` | in | 2 | bit 0 qualifies `(cx1,d1)`; bit 1 qualifies `(cx2,d2)` and only counts with bit 0 |
| `cx1`, `d1` | in | 5, 1 | first symbol: context and decision |
| `cx2`, `d2` | in | 5, 1 | second symbol, coded after the first |
| `flush` | in | 1 | end of code-block; no symbols in this cycle |
| `bo[0:3]` | out | 4 x 8 | code bytes BO1..BO4, in stream order |
| `oe` | out | 4 | `oe[k]` marks `bo[k]` valid |
| `last` | out | 1 | these bytes end the code-block |

- A pair can be given every clock. There is no back-pressure.
- A pair given before clock edge *t* shows up on `bo`/`oe` after edge *t+2*.
- Each cycle carries up to four bytes: two from each symbol. Read them in the
  order `bo[0]`..`bo[3]`, skipping slots whose `oe` bit is clear.
- `flush` ends the code stream. It emits the final bytes two clocks later with
  `last` high, and resets A, C, CT, B and every context to their start
  values. The next code-block can start on the very next clock.

Start state:

- A = 0x8000, C = 0, CT = 12, B = 0.
- Contexts use the JPEG 2000 numbering: zero coding 0–8, sign 9–13,
  refinement 14–16, run-length 17, uniform 18.
- Every context starts with MPS = 0. Context 0 starts at state index 4,
  context 17 at 3, context 18 at 46, and all others at 0.
- Context numbers of 19 or more read as context 0.

## Registers and numbers

| register | width | role |
|---|---|---|
| A | 16 | Interval size. Normalised means ≥ 0x8000. |
| C | 28 | Code register: upper 12 bits C12 (bit 27 is the carry), lower 16 bits C16 (the interval's lower bound). |
| CT | 4 | Free bit positions left in C12 before the next byte-out (1..12). |
| B | 8 | Last byte formed. It is held back because a later carry may still add 1 to it. |

The probability model is the 47-state JPEG 2000 table (Qe, NMPS, NLPS,
SWITCH), in `mq_pkg`. Two more tables come from Qe in the same package, by
constant functions:

- `RA[I]`: the number of leading zeros of `Qe[I]`.
- `RQe[I]`: `Qe[I] << RA[I]`.

## Stage 1: interval update (`mq_interval_update`, `mq_update_a`, `mq_cx_state`)

Each `mq_update_a` codes one symbol with no clock. Given A, D and the
context's state (MPS, I), it computes the following:

- **Which interval survives.**
  - The conditional-exchange test `A-Qe < Qe` is done as `A < 2·Qe`, so it
    does not wait for the subtractor.
  - For an MPS, the new interval is Qe when the exchange fires, otherwise
    `A-Qe`.
  - For an LPS, it is the reverse.
  - `R = 1` exactly when `A-Qe` survives. In that case C must gain Qe.
- **Renormalised A and RA, on two paths side by side.**
  - Since A ≥ 0x8000 and Qe ≤ 0x5601, `A-Qe` is above 0x29FF. Its top two
    bits give a shift of 0, 1 or 2.
  - The Qe path reads `RQe[I]` and `RA[I]`.
- **Next state.**
  - After an MPS that renormalises: NMPS.
  - After an LPS: NLPS, and the MPS sense flips where SWITCH is set.

Two of these units are chained through A. The two contexts are read from the
bank in parallel. When `cx1 == cx2`, a multiplexer gives the second unit the
first unit's *new* state instead of the stale bank entry. The bank has two
write ports, and port 2 wins a collision. The stage registers `(Qe, R, RA)` for
each symbol, plus the flush flag. With a flush it also passes on the current A.

## Stage 2: code update (`mq_code_update`)

This is the hard part. In the sequential coder each symbol does
`C += Qe` (if R), then RA times: shift A and C left, decrement CT, and when
CT reaches 0 run BYTEOUT:

```
if B == 0xFF:           emit B; B = C[27:20];         C &= 0xFFFFF; CT = 7   (stuffed)
elif C[27] == 0:        emit B; B = C[26:19];         C &= 0x7FFFF; CT = 8
else: B += 1 (carry);   if B == 0xFF: C[27]=0, then as the stuffed case
                        else          emit B; B = C[26:19]; C &= 0x7FFFF; CT = 8
```

Stage 2 does this for two symbols in one clock. Each symbol slot is a chain
of four units.

### Update C (`mq_update_c`)

C16 + Qe is a 16-bit add. Its carry-out drives a 12-bit incrementer on C12.
CARRY is the bit that will sit at bit 27 after the first CT shifts, which is
`C[27-CT]`. It is taken from both the unchanged and the added C and picked by
R, so it is ready as soon as the adder is.

### Mask generator (`mq_mask_gen`)

- A first byte-out happens when `RA ≥ CT`.
- A second one follows when `RA ≥ CT+7` after a stuffed byte, or `RA ≥ CT+8`
  otherwise.
- A third is impossible within 15 shifts. After a stuffed byte, the next byte
  is at most 0x80, so it cannot be stuffed, and 1 + 7 + 8 > 15.

In the coordinates of C after the first CT shifts, the mask that keeps what
survives is:

| byte-outs | first byte stuffed | first byte not stuffed |
|---|---|---|
| 0 | all ones | all ones |
| 1 | `0x00FFFFF` | `0x007FFFF` |
| 2 | `0x0000FFF` | `0x00007FF` |

The two-byte entries assume the second byte is not stuffed. The chosen mask is
shifted right by CT to line up with the un-renormalised C. `B == 0xFF`, or
`B == 0xFE` with CARRY, selects the stuffed column. The renormalised C is then
`(C & MASK) << RA`. This matches the bit-serial process because masking and
shifting commute.

### Byte output (`mq_byte_output`)

This unit computes in closed form what the byte-outs emit:

- **First byte:** `B + CARRY`, or plain B if B is 0xFF.
- **New B:** 8 bits of the shifted C, or 7 bits after stuffing.
- **Second byte:** that new B, unchanged. No addition can reach it inside one
  symbol, so its carry is 0.
- **Third B and next CT.**

The second byte is stuffed only if it is 0xFF. In that case the second
byte-out should have kept 20 bits, but the mask kept only 19. ECMASK marks the
missing bit: bit 19 after both byte-outs, shifted back by `CT + CT1` (CT1 is
the CT set by the first byte-out). The design ORs it into the mask.

### Two slots and the output enables (`mq_oe_gen`)

The first slot's renormalised C, new B and new CT feed the second slot. The
second slot's Update C therefore runs in parallel with the first slot's
byte-output logic.

The OE generator passes the four byte-commit flags through as OE1..OE4, with
one exception. It drops the first commit of each code-block: that byte is the
initial content of B, which only exists to absorb a carry, and is not part of
the code stream.

### Termination

`flush` runs the standard MQ FLUSH in one clock:

1. Set the low 16 bits of C, then subtract 0x8000 if that would leave the
   interval `[C, C+A)`.
2. The first slot shifts by CT with one byte-out.
3. The second slot shifts by the new CT with another byte-out.
4. The remaining B goes out on BO4 unless it is 0xFF.

## Where this RTL departs from the description it follows, or fills gaps

These are choices of this design:

- **Termination.** The FLUSH step is the JPEG 2000 procedure, added so that a
  code-block can be completed.
- **Handshake.** The per-symbol valid bits, the single-symbol cycle and the
  reset behaviour are this design's own.
- **Context count.** There are 19 contexts, with the JPEG 2000 start states.
  These are not part of the two-stage architecture; change `NUM_CX` and
  `mq_pkg::cx_init` for other uses of the MQ coder, such as JBIG2.
- **ECMASK placement.** The correction is applied *before* the second
  symbol's adder. Applying it after that adder, as a plain OR, is wrong
  whenever the second addition carries into the restored bit, so this design
  takes the exact placement. This adds the ECMASK logic to the path between
  the two slots.
- **Mask constants.** The constants come from the BYTEOUT masks above, not
  copied from any drawing.
- **Byte output and OE generator.** These two units are only specified by
  function. Their insides here are the simplest closed form of two byte-outs,
  and of enable generation with placeholder suppression.
- **Output registers.** BO/OE are registered at the end of stage 2.
- **Update C width.** Update C passes the full 28-bit C to the mask and
  shifter, not only its low 16 bits.
- **Timing is not verified.** The architecture targets an 11 ns critical path
  (about 90 MHz, 180 M symbols/s) in a 0.35 µm process, at about 7.7 k gates.
  This RTL has only been simulated and synthesised generically. No timing or
  gate-count figure has been reproduced.

## Verification

`tb/mq_ref_pkg.sv` is a separate, bit-serial model of the MQ encoder: the
standard CODEMPS/CODELPS, RENORME, BYTEOUT and FLUSH, with its own copy of the
probability table. Every testbench checks itself against worked-out values
and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_mq_two_symbol_ae` | 15 code-blocks (about 12 M symbols) under five statistics. It compares the whole byte stream with the reference, checks the 2-clock latency and the one-pair-per-clock rate, and counts carries, stuffing, conditional exchanges, two byte-outs in one symbol, stuffed second bytes (ECMASK), 15-bit shifts, same-context pairs, single-symbol and idle cycles, four-byte cycles and flushes. It fails if any of these never happens. Runs at default parameters in about 10 s. |
| `tb_mq_interval_update` | Stage-1 outputs, cycle by cycle, against a sequential A/context model. |
| `tb_mq_code_update` | Stage-2 C/CT/B after every clock, and the code streams, with legal random work biased to tiny Qe. |
| `tb_mq_update_a` | All 47 states × MPS × D against CODEMPS/CODELPS + RENORME. |
| `tb_mq_cx_state` | The bank against an array model, including collisions and clear. |
| `tb_mq_update_c` | The add and CARRY against 28-bit arithmetic. |
| `tb_mq_mask_gen` | Every CT/RA/CARRY with stuffing and non-stuffing B, against bit-serial masking. |
| `tb_mq_byte_output` | The bytes, B, CT, and C through ECMASK, against the reference's bit-serial byte-out. |
| `tb_mq_oe_gen` | Exhaustive. |

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/mq_pkg.sv tb/mq_ref_pkg.sv tb/tb_mq_two_symbol_ae.sv \
    --top-module tb_mq_two_symbol_ae
./obj_dir/Vtb_mq_two_symbol_ae
```

Replace the testbench name for the others. All of them use the packages.

## Files

- `rtl/mq_pkg.sv`: widths, types (`cx_state_t`, `sym_op_t`), the probability
  table, the RA/RQe functions and the context start states.
- `rtl/mq_two_symbol_ae.sv`: top. Holds assertions that A stays normalised,
  that CT stays in 1..12, and that a flush carries no symbols.
- `rtl/mq_interval_update.sv`, `mq_update_a.sv`, `mq_cx_state.sv`: stage 1.
- `rtl/mq_code_update.sv`, `mq_update_c.sv`, `mq_mask_gen.sv`,
  `mq_byte_output.sv`, `mq_oe_gen.sv`: stage 2.
- `tb/`: the reference model and the testbenches.
