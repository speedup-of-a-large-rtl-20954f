# 72 + 32×32 multiply-accumulate unit with a carry-save accumulate loop

A multiply-accumulate (MAC) unit is limited by its feedback path: the next
accumulation cannot start until the previous one is complete. In a
conventional MAC that path holds a full-width carry-propagate adder. Here
the path holds two carry-save adders and nothing more. The accumulator
circulates as two carry-save words, A1 (sum word) and A2 (carry word). The
71-bit carry propagation happens afterwards, in a deeply pipelined
ripple-carry adder (RCA) outside the loop. The accumulator's sign bit and
the overflow flag depend on the previous result, so a second small feedback
loop after the adder computes them. Both feedback loops, and the two
slowest multiplier stages, are duplicated with NULL Cycle Reduction (NCR):
consecutive operations go alternately to an original and a duplicate
circuit.

The architecture was designed as a delay-insensitive NULL Convention Logic
(NCL) circuit. This RTL is a synchronous, clocked rendering of that
architecture. It keeps the pipeline stages, the NCR duplication with its
demultiplexers, sequencers and multiplexers, the DATA0-initialised feedback
and the handshakes between stages. It does not model dual-rail encoding,
threshold gates or NCL timing.

## Operations and number format

Each operation takes two 32-bit operands X and Y and three control
signals:

| input       | values                                                         |
|-------------|----------------------------------------------------------------|
| `sign_mode` | 0 = signed×signed, 1 = signed X × unsigned Y, 2 (and 3) = unsigned×unsigned |
| `add_sub`   | 0 = add the product to the accumulator, 1 = subtract it         |
| `mac_mpy`   | 0 = accumulate, 1 = multiply only (the accumulator is taken as 0) |

Every operation returns the new 72-bit two's-complement accumulator `aout`
and an overflow flag `ov`. After reset the accumulator is zero.

The operands are fractions. A signed operand is Q1.31 (value = integer /
2^31), for example A61C039Dh = −0.70227. An unsigned operand is Q0.32. The
accumulator is Q8.64: its binary point lies above bit 64. Products are
shifted into that position: left by 2 for signed×signed, by 1 for
signed×unsigned, and not at all for unsigned×unsigned. A product therefore
never exceeds ±1.0 (2^64).

**Exact range and overflow.** The adders work on the low 71 bits, modulo
2^71. Bit 71 is rebuilt by the overflow loop. A result is exact, and `ov`
is 0, while it lies in [−2^70, 2^70), that is, |value| < 64.0. When an
addition leaves that range, `ov` is 1 and `aout[71]` still gives the true
sign of the sum, so the 72-bit result is still exact. Further additions of
the same sign stay exact, with `ov` = 1, as long as the sum fits in 72
bits. An addend of the opposite sign can then give a wrong sign and a wrong
flag. Restart the accumulator with a multiply-only operation after an
overflow. The flag is not sticky.

How bit 71 and `ov` are found: let a be the previous result's sign (0 for
multiply-only), p the sign of the addend (multiply sign XOR subtract), and
s bit 70 of the new 71-bit sum. Then:

```
a == p : sign = a,  ov = (s != a)     like signs: overflow if the sum changed sign
a != p : sign = s,  ov = 0            unlike signs never overflow
```

These equations hold if the previous result was in range, because then its
bits 71 and 70 are equal. They also hold if p is wrongly 1 for a zero
product, for example (−x)·0. So the multiply sign can be taken from the
operand signs alone.

## Dataflow

```
 X,Y,ctrl ─► ff_multiplier ─► acc_fb_loop ─► rca_pipe ─► ovf_loop ─► aout, ov
             12 stages         A1,A2 loop     35 stages    sign/OV loop
                                  ▲   │                      ▲   │
                                  └───┘ A1,A2                └───┘ aout[71]
```

### Multiplier (`ff_multiplier`)

| stage | contents                                                                  |
|-------|---------------------------------------------------------------------------|
| 1     | input register: X, Y, Sign (2 bits), Add/Sub, Mac/Mpy (68 bits)           |
| 2     | NCR partial-product generation (`pp_gen` ×2): 33 rows and the multiply sign |
| 3–10  | one carry-save layer each: 31 rows (+2 passed) → 23 → 16 → 11 → 8 → 6 → 4 → 3 → 2 |
| 11    | NCR "2's complement and shift" (`twos_shift` ×2): 2 words → 3 words       |
| 12    | final carry-save layer: 3 → 2 words, PP1 and PP2                          |

`pp_gen` builds the rows as follows. X is extended to 71 bits: with its
sign when X is signed, with zeros otherwise. Rows 0 to 30 are `X_ext << j`
where bit j of Y is 1. Row 31 handles bit 31 of Y. When Y is unsigned it is
`X_ext << 31`. When Y is signed it is the row's negation, `~X_ext << 31`,
and row 32 holds the matching `+2^31` correction. Negating a carry-save
pair uses −(a+b) = ~a + ~b + 2, so subtraction adds a third word, the
constant 2. The final layer absorbs it.

### Accumulate feedback loop (`acc_fb_loop`, `acc_fb_copy`)

Each copy of the loop circuitry has four registers:

1. An input register. Its feed-forward half takes PP1, PP2, the multiply
   sign and the control signals. Its feedback half takes the previous A1
   and A2. The two halves latch independently and release together.
2. A register after A1 and A2 are zeroed for multiply-only operations.
3. A register after the first carry-save adder: PP1 + PP2 + A1.
4. A register after the second carry-save adder: + A2, giving the new A1
   and A2.

NCR arrangement:

- A feed-forward demultiplexer with a **Type 1** sequencer deals operations
  alternately to copy A and copy B: even-numbered operations to A,
  odd-numbered to B.
- A feedback demultiplexer with a **Type 2** sequencer deals the previous
  accumulator alternately to A and B. At reset its A output holds a
  **DATA0** token: an all-zero accumulator, waiting for operation 0. That
  token counts as the first transfer, so the Type 2 sequencer comes out of
  reset pointing at B. This way the result of operation 0, made in copy A,
  goes to copy B, where operation 1 is waiting.
- A multiplexer with a Type 1 sequencer merges the two copies' results in
  order. The merged result goes into a non-functional output register.
- The output register's A1/A2 go to two places: back to the feedback
  demultiplexer and on to the adder. The token leaves only when both take
  it; this is the two-input completion.

Why the input register has independent halves: the feedback token has to
be able to park in a copy before that copy's next operation arrives. With a
joint latch, the last result of a stream could never leave the loop.

### Ripple-carry adder (`rca_pipe`)

A2 is a carry word, so its bit 0 is always 0, and bit 0 of the sum is
A1[0]. The adder covers bits 1..70. It is pipelined as 35 stages of 2-bit
ripple-carry adders (the `BITS` and `STAGES` parameters). Each stage
register carries both operand words, the sum bits finished so far and the
carry.

### Overflow feedback loop (`ovf_loop`, `ovf_copy`)

This loop has the same shape as the accumulate loop:

- a feed-forward demultiplexer (Type 1 sequencer);
- a 1-bit feedback demultiplexer (Type 2 sequencer) carrying `aout[71]`,
  reset to DATA0, which means a positive empty accumulator;
- two copies, each with an input register (two halves), "calculate
  accumulate sign" (the previous sign, forced to 0 for multiply-only) and
  "calculate overflow" (the equations above);
- an output multiplexer.

The loop is the last stage, so it has no non-functional output register.
The multiplexer output is the MAC output, and it is handed to the consumer
and to the feedback demultiplexer together.

## Clocked rendering of the NCL handshake

| NCL                                      | this RTL                                            |
|------------------------------------------|-----------------------------------------------------|
| register + completion logic              | `hs_reg`, a one-entry half buffer                   |
| DATA wavefront                           | a valid token                                       |
| NULL wavefront                           | the clock in which a register is empty after handing on its token |
| Ko (request to the previous stage)       | `in_ready` = register empty (never depends combinationally on `out_ready`) |
| Ki (request from the next stage)         | `out_ready`                                         |
| register reset to DATA                   | `hs_reg` with `INIT_FULL`, or `ncr_demux` with `INIT_DATA0` |
| sequencer states 10,00,01,00 (Type 1)    | `ncr_sequencer`, a toggle that steps on each transfer; the 00 (NULL) steps are implicit |
| one sequencer per bit                    | one sequencer per word (all bits of a token move together) |
| full-word and bit-wise completion        | the same register; the difference is timing only    |

Because every register is a half buffer, a plain stage passes one token
every two clocks, just as an NCL stage needs a DATA and a NULL phase. An
NCR pair accepts a token on every clock. In a feedback loop the duplicate
does not shorten the loop, but it lets the next operation wait in the
other copy.

All flip-flops reset asynchronously on `rst_n` low. Registers reset empty;
the two feedback demultiplexers reset holding DATA0.

## Interface and timing (`mac_top`)

| port                        | dir | width | meaning                                  |
|-----------------------------|-----|-------|------------------------------------------|
| `clk`, `rst_n`              | in  | 1     | clock; asynchronous active-low reset     |
| `in_valid`, `in_ready`      | in/out | 1  | operation handshake                      |
| `x`, `y`                    | in  | 32    | operands                                 |
| `sign_mode`                 | in  | 2     | `mac_pkg::sign_mode_e`                   |
| `add_sub`, `mac_mpy`        | in  | 1     | subtract; multiply only                  |
| `out_valid`, `out_ready`    | out/in | 1  | result handshake                         |
| `aout`                      | out | 72    | accumulator after the operation          |
| `ov`                        | out | 1     | overflow of this result                  |

An operation transfers on a rising edge where `in_valid && in_ready`; a
result does likewise with `out_valid && out_ready`. There is one result per
operation, in order. The output holds steady while `out_ready` is low.

Through an idle pipeline, one operation takes 55 clocks. The multiplier
takes 12, the accumulate loop 5, the adder 35 and the overflow loop 3. In
steady state the MAC completes one operation every 5 clocks. That is the
accumulate loop's round trip: the output register, the feedback half of
the other copy's input register, and that copy's three further registers.
The next operation cannot use the carry-save result before it has made
this trip, so in this model the loop sets the throughput. The
cycle times of the NCL original are in nanoseconds and gate delays; the
clocked model does not reproduce them.

## Files

All sources are SystemVerilog (IEEE 1800-2017).

| file | contents |
|------|----------|
| `rtl/mac_pkg.sv` | widths, `sign_mode_e`, `ctrl_t`, token structs |
| `rtl/mac_top.sv` | top level |
| `rtl/ff_multiplier.sv`, `pp_gen.sv`, `csa_layer.sv`, `twos_shift.sv` | multiplier |
| `rtl/acc_fb_loop.sv`, `acc_fb_copy.sv` | accumulate feedback loop |
| `rtl/rca_pipe.sv` | pipelined ripple-carry adder |
| `rtl/ovf_loop.sv`, `ovf_copy.sv` | overflow feedback loop |
| `rtl/ncr_ff.sv`, `ncr_demux.sv`, `ncr_mux.sv`, `ncr_sequencer.sv` | NCR building blocks |
| `rtl/hs_reg.sv` | handshake register (NCL register stand-in) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the block's outputs with values it computes
independently, mostly with 128-bit integer arithmetic. It ends with a line
`TB_RESULT checks=N failures=M`.

- `tb_mac_top` runs the full-size design end to end.
  - It first runs a reference accumulation: Σ X_i·Y_i for i = 0..255, with
    X_i = A61C039Dh + i·2^10 and Y_i = F0046718h + i·2^20 (that is,
    X_0 + i·2^−21 and Y_0 + i·2^−11), signed×signed, starting from the
    reset value. The final accumulator is about +11.2554.
  - It then runs 400 random operations in all modes, with random input
    gaps and output back-pressure.
  - Finally it pushes the accumulator past +64 and below −64 to raise
    `ov`.
  - It counts the mechanisms: both copies of all four NCR stages, the two
    DATA0 reset tokens, input and output stalls, overflow in both
    directions, every mode, subtract and multiply-only. It fails if any of
    them never happened.
- The block testbenches check the following:
  - arithmetic identities: rows sum to X·Y, carry-save sums are preserved,
    shift and negation are right;
  - token order under random stalls;
  - NCR alternation and the DATA0 start;
  - latencies: 12 clocks for the multiplier, 35 for the adder;
  - rates: a half buffer passes one token per 2 clocks, and an NCR pair
    accepts one token per clock.

To simulate with Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/mac_pkg.sv tb/tb_mac_top.sv --top-module tb_mac_top
./obj_dir/Vtb_mac_top
```

Replace `tb_mac_top` with any other testbench name to run that one. The
whole-design test takes well under a second.

## Where this RTL departs from the NCL design

- **No NCL circuit level.** There are no dual-rail signals, no threshold
  gates with hysteresis and no completion trees. The Type 2 sequencer's
  implementation (changed reset states of TH33 gates) is replaced by a
  different reset value of a toggle flip-flop.
- **Per-word sequencers.** Where the original has one sequencer per bit,
  this RTL has one per word.
- **Register widths.** Control is encoded as 4 binary bits and carry-save
  words are 71 bits wide. The internal registers are therefore a few bits
  wider than the original's (for example 289 instead of 282 bits at the
  accumulate loop input).
- **Choices of this design.** These are not taken from the original:
  - the row encoding of the partial products;
  - the binary-point position (Q8.64);
  - which operand is signed in signed×unsigned (X);
  - the overflow equations and the behaviour after an overflow;
  - multiply-only honouring Add/Sub (it returns −product).
- **Adder stage contents.** The adder's stage registers carry both full
  words rather than only the bits still needed, which costs flip-flops.
- **Throughput.** In the NCL original, the four NCR sections and the
  re-pipelined multiplier balance every stage to the same cycle time. In
  this clocked model the accumulate loop's round trip sets the rate.
